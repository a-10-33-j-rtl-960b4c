// One coefficient datapath of a layer: butterfly, modular multiply, modular add.
//
// It holds one ADD unit (mod_add), one SUB unit (mod_sub) and one Barrett
// multiplier (MULT), and op-select multiplexers that reorder them:
//   DP_CT  Cooley-Tukey butterfly (forward NTT): x = a + b*w, y = a - b*w.
//          The multiplier runs first (10 cycles), ADD/SUB last (1 cycle).
//   DP_GS  Gentleman-Sande butterfly (inverse NTT): x = a + b, y = (a - b)*w.
//          ADD/SUB run first (1 cycle), the multiplier last (10 cycles).
//   DP_MUL x = a*w, coefficient-wise product (dyadic product, N^-1 scaling).
//   DP_ADD x = a + b, coefficient-wise sum, combinational.
// The orderings and the 10+1 cycle schedule of the two butterflies follow the
// published datapath; how the unit is shared by DP_MUL and DP_ADD, and the
// port list, are this design's choices.
//
// Timing: DP_CT and DP_GS: one butterfly per cycle, x/y valid 13 cycles
// after a/b/w (input register, 11 compute cycles, output register: the
// 13-stage datapath of the published design). DP_MUL: 10
// cycles. DP_ADD: same cycle. op selects the multiplexers of every stage, so it
// must stay constant while an operation's data is in flight; the controller
// drains the pipeline before it changes op.
module bf_datapath
  import he_pkg::*;
#(
  parameter int unsigned QB = 36
) (
  input  logic     clk,
  input  dp_op_e   op,
  input  coef_t    a,
  input  coef_t    b,
  input  coef_t    w,     // twiddle factor or multiplicand
  input  coef_t    q,
  input  logic [W:0] mu,  // Barrett constant of q
  output coef_t    x,
  output coef_t    y
);
  localparam int unsigned MLAT = 10;

  // input register (first pipeline stage of the butterflies)
  coef_t a_r, b_r, w_r, w_r1;
  always_ff @(posedge clk) begin
    a_r  <= a;
    b_r  <= b;
    w_r  <= w;
    w_r1 <= w_r;
  end

  // ADD / SUB units with their operand multiplexers
  coef_t m_p;                 // multiplier result
  coef_t dly_out;             // end of the 10-cycle bypass line
  coef_t add_a, add_b, sub_a, sub_b;
  coef_t add_o, sub_o;
  coef_t as_sum, as_dif;      // registered ADD/SUB outputs
  always_comb begin
    unique case (op)
      DP_CT:   begin add_a = dly_out; add_b = m_p; end
      DP_GS:   begin add_a = a_r;     add_b = b_r; end
      default: begin add_a = a;       add_b = b;   end
    endcase
    sub_a = add_a;
    sub_b = add_b;
  end
  mod_add #(.W(W)) u_add (.a(add_a), .b(add_b), .q(q), .s(add_o));
  mod_sub #(.W(W)) u_sub (.a(sub_a), .b(sub_b), .q(q), .d(sub_o));
  always_ff @(posedge clk) begin
    as_sum <= add_o;
    as_dif <= sub_o;
  end

  // multiplier with its operand multiplexers
  coef_t m_a, m_b;
  always_comb begin
    unique case (op)
      DP_CT:   begin m_a = b_r;    m_b = w_r;  end
      DP_GS:   begin m_a = as_dif; m_b = w_r1; end
      default: begin m_a = a;      m_b = w;    end
    endcase
  end
  barrett_mult #(.W(W), .QB(QB), .LAT(MLAT)) u_mult (
    .clk(clk), .a(m_a), .b(m_b), .q(q), .mu(mu), .p(m_p));

  // 10-cycle line carrying the operand that bypasses the multiplier:
  // a (CT) or a+b (GS)
  coef_t line [MLAT];
  always_ff @(posedge clk) begin
    line[0] <= (op == DP_GS) ? as_sum : a_r;
    for (int i = 1; i < MLAT; i++) line[i] <= line[i-1];
  end
  assign dly_out = line[MLAT-1];

  // butterfly output register (13th stage)
  coef_t bx, by;
  always_ff @(posedge clk) begin
    bx <= (op == DP_GS) ? dly_out : as_sum;
    by <= (op == DP_GS) ? m_p     : as_dif;
  end

  // output multiplexer
  always_comb begin
    unique case (op)
      DP_CT, DP_GS: begin x = bx;  y = by; end
      DP_MUL:  begin x = m_p;     y = '0;     end
      default: begin x = add_o;   y = '0;     end
    endcase
  end
endmodule
