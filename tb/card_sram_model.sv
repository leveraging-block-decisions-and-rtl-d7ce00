// card_sram_model -- behavioural model of the SRAM bank on the scheduler's
// PCI card, for testbenches only.
//
// The real part is an external SRAM chip shared by the host and the FPGA
// (ownership switched per transfer). The model has a host write port and an
// FPGA read port; read data appears one clock after rd_en, as the streaming
// engine expects. Only DEPTH words are modelled; the address is used modulo
// DEPTH.
module card_sram_model #(
  parameter int unsigned ADDR_W = 22,
  parameter int unsigned DEPTH  = 1024
) (
  input  logic              clk,
  // host side
  input  logic              host_wr_en,
  input  logic [ADDR_W-1:0] host_addr,
  input  logic [15:0]       host_wdata,
  // FPGA side
  input  logic              fpga_own,
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [15:0]       rd_data
);

  logic [15:0] mem [DEPTH];

  initial for (int i = 0; i < DEPTH; i++) mem[i] = '0;

  always @(posedge clk) begin
    if (host_wr_en) begin
      assert (!fpga_own) else $error("card_sram_model: host write while the FPGA owns the bank");
      mem[host_addr % DEPTH] <= host_wdata;
    end
    if (rd_en) rd_data <= mem[rd_addr % DEPTH];
  end

endmodule
