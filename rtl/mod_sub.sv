// Modular subtractor: d = (a - b) mod q for a, b < q.
// Subtracts, adds q back in parallel and keeps the corrected value when the
// subtraction borrows. Purely combinational, like the SUB unit of the datapath.
module mod_sub #(
  parameter int unsigned W = 40
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] q,
  output logic [W-1:0] d
);
  logic [W:0] diff;
  logic [W:0] fix;
  always_comb begin
    diff = {1'b0, a} - {1'b0, b};
    fix  = diff + {1'b0, q};
    d    = diff[W] ? fix[W-1:0] : diff[W-1:0];
  end
endmodule
