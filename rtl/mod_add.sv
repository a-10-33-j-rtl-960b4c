// Modular adder: s = (a + b) mod q for a, b < q.
// Adds the operands, subtracts q from the sum in parallel and keeps the
// difference when it does not borrow. Purely combinational; one adder and one
// subtractor, as drawn for the ADD unit of the datapath.
module mod_add #(
  parameter int unsigned W = 40
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] q,
  output logic [W-1:0] s
);
  logic [W:0] sum;
  logic [W:0] red;
  always_comb begin
    sum = {1'b0, a} + {1'b0, b};
    red = sum - {1'b0, q};
    s   = red[W] ? sum[W-1:0] : red[W-1:0];
  end
endmodule
