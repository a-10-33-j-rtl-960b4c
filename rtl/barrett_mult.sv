// Pipelined modular multiplier: p = (a * b) mod q with Barrett reduction.
//
// For a QB-bit prime q the Barrett constant is mu = floor(2^(2*QB) / q). The
// estimate qh = ((a*b >> (QB-1)) * mu) >> (QB+1) is at most two below the true
// quotient, so r = a*b - qh*q < 3q and two conditional subtractions finish it.
// q and mu are inputs (the per-layer constants fed to the multiplier); QB must
// match q. Inputs a, b < q.
//
// Timing: fully pipelined, one product per cycle, LAT = 10 register stages
// from a/b to p (the ten multiplier cycles of the published schedule). The
// split of the arithmetic over the stages is this design's own: product,
// mu-product, quotient, q-product, subtraction, two corrections, three
// balancing stages.
module barrett_mult #(
  parameter int unsigned W   = 40,
  parameter int unsigned QB  = 36,
  parameter int unsigned LAT = 10
) (
  input  logic           clk,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  input  logic [W-1:0]   q,
  input  logic [W:0]     mu,
  output logic [W-1:0]   p
);
  localparam int unsigned PW = 2 * W;   // full product width
  localparam int unsigned RW = W + 2;   // remainder width (r < 3q)

  logic [PW-1:0] prod1, prod2, prod3, prod4;
  logic [PW-1:0] t2;
  logic [PW-1:0] qh3;
  logic [PW-1:0] m4;
  logic [RW-1:0] r5, r6, r7;
  logic [W-1:0]  dly [LAT-7];

  logic [PW-1:0] h1;
  logic [RW-1:0] qx;
  assign h1 = prod1 >> (QB - 1);
  assign qx = RW'(q);

  always_ff @(posedge clk) begin
    // 1: full product
    prod1 <= PW'(a) * PW'(b);
    // 2: multiply the high part by mu
    t2    <= h1 * PW'(mu);
    prod2 <= prod1;
    // 3: quotient estimate
    qh3   <= t2 >> (QB + 1);
    prod3 <= prod2;
    // 4: qh * q
    m4    <= qh3 * PW'(q);
    prod4 <= prod3;
    // 5: remainder, only the low RW bits are significant
    r5    <= RW'(prod4) - RW'(m4);
    // 6, 7: corrections
    r6    <= (r5 >= qx) ? r5 - qx : r5;
    r7    <= (r6 >= qx) ? r6 - qx : r6;
    // 8..LAT: balancing stages
    dly[0] <= W'(r7);
    for (int i = 1; i < LAT - 7; i++) dly[i] <= dly[i-1];
  end

  assign p = dly[LAT-8];
endmodule
