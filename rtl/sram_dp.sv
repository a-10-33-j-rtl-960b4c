// Dual-port SRAM, DEPTH x WIDTH (default 1024 x 80), one read port and one
// write port, both synchronous to clk. A read returns the word one cycle
// later; a read and a write of the same address in one cycle return the old
// word. This stands for the dual-port SRAM macro of the published design;
// the read-old-data rule is this design's choice. The array is not reset.
module sram_dp #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 80
) (
  input  logic                     clk,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata
);
  logic [WIDTH-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
    if (we) mem[waddr] <= wdata;
  end
endmodule
