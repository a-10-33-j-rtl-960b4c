// Twiddle-factor ROM: DEPTH x 40-bit, synchronous read (one cycle).
//
// Entry k holds psi^brv(k) mod q (forward NTT, INV = 0) or psi^-brv(k) mod q
// (inverse NTT, INV = 1), where psi is a primitive 2N-th root of unity mod q
// and brv() reverses the LOG2(DEPTH) bits of k. This is the bit-reversed
// powers-of-psi order that an in-place negacyclic Cooley-Tukey / Gentleman-
// Sande NTT indexes as table[2^s + group] in stage s. The contents are computed
// at elaboration from Q and PSI, so the ROM needs no data file. A 4096-entry,
// 40-bit ROM per datapath and per transform direction follows the published
// memory list; the table order is this design's choice.
module twiddle_rom #(
  parameter int unsigned    W     = 40,
  parameter int unsigned    DEPTH = 4096,
  parameter logic [W-1:0]   Q     = 40'h0ffffee001,
  parameter logic [W-1:0]   PSI   = 40'd5546991020,
  parameter bit             INV   = 1'b0
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic [W-1:0]             data
);
  localparam int unsigned AB = $clog2(DEPTH);
  typedef logic [W-1:0] tbl_t [DEPTH];

  function automatic logic [W-1:0] mulmod(logic [W-1:0] x, logic [W-1:0] y);
    logic [2*W-1:0] t;
    t = (2*W)'(x) * (2*W)'(y);
    return W'(t % (2*W)'(Q));
  endfunction

  // psi^-1 = psi^(2N-1) = psi^(2*DEPTH - 1)
  function automatic logic [W-1:0] root();
    logic [W-1:0] r;
    r = PSI;
    if (INV) for (int i = 0; i < 2 * DEPTH - 2; i++) r = mulmod(r, PSI);
    return r;
  endfunction

  function automatic tbl_t gen_table();
    tbl_t t;
    logic [W-1:0] p, g;
    logic [AB-1:0] idx, rev;
    g = root();
    p = W'(1);
    for (int i = 0; i < DEPTH; i++) begin
      idx = AB'(i);
      for (int bi = 0; bi < AB; bi++) rev[bi] = idx[AB-1-bi];
      t[rev] = p;
      p = mulmod(p, g);
    end
    return t;
  endfunction

  localparam tbl_t TABLE = gen_table();

  always_ff @(posedge clk) data <= TABLE[addr];
endmodule
