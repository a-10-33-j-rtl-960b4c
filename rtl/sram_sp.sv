// Single-port SRAM, DEPTH x WIDTH (default 2048 x 80): one access per cycle,
// a read (en & !we) returns the word one cycle later, a write (en & we)
// stores wdata. Stands for the single-port SRAM macros that hold the key and
// the error polynomial. The array is not reset.
module sram_sp #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned WIDTH = 80
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
