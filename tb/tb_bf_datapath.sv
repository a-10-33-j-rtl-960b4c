// Self-checking test of bf_datapath for the 37-bit prime of layer 2.
// Streams random operands for each operation and checks every output against
// a reference computed here, at the documented latency: 13 cycles for the
// Cooley-Tukey and Gentleman-Sande butterflies, 10 for the product, 0 for the
// sum. Also checks operands at the edges of the range (0 and q-1).
module tb_bf_datapath;
  import he_pkg::*;

  localparam int unsigned L = 2;
  localparam coef_t Q = Q_TAB[L];

  logic clk = 1'b0;
  always #5 clk = ~clk;

  dp_op_e op = DP_CT;
  coef_t a = '0, b = '0, w = '0, x, y;

  bf_datapath #(.QB(QB_TAB[L])) dut (
    .clk(clk), .op(op), .a(a), .b(b), .w(w), .q(Q), .mu(barrett_mu(L)), .x(x), .y(y));

  int checks = 0, failures = 0;

  function automatic coef_t mm(coef_t p, coef_t r);
    logic [79:0] t;
    t = 80'(p) * 80'(r);
    return coef_t'(t % 80'(Q));
  endfunction
  function automatic coef_t ma(coef_t p, coef_t r);
    return coef_t'((41'(p) + 41'(r)) % 41'(Q));
  endfunction
  function automatic coef_t ms(coef_t p, coef_t r);
    return coef_t'((41'(p) + 41'(Q) - 41'(r)) % 41'(Q));
  endfunction

  function automatic coef_t rnd();
    int sel = int'($urandom_range(0, 9));
    if (sel == 0) return '0;
    if (sel == 1) return Q - 1;
    return coef_t'({$urandom, $urandom} % 64'(Q));
  endfunction

  localparam int NV = 300;
  coef_t ea [NV], eb [NV];

  task automatic run(dp_op_e o, int lat);
    op = o;
    for (int t = 0; t < NV + lat; t++) begin
      if (t < NV) begin
        a = rnd(); b = rnd(); w = rnd();
        unique case (o)
          DP_CT:  begin ea[t] = ma(a, mm(b, w)); eb[t] = ms(a, mm(b, w)); end
          DP_GS:  begin ea[t] = ma(a, b);        eb[t] = mm(ms(a, b), w); end
          DP_MUL: begin ea[t] = mm(a, w);        eb[t] = '0; end
          default: begin ea[t] = ma(a, b);       eb[t] = '0; end
        endcase
      end
      #1;
      if (t >= lat) begin
        checks++;
        if (x != ea[t - lat] || y != eb[t - lat]) begin
          failures++;
          if (failures < 10)
            $display("FAIL %s item %0d: got %h %h exp %h %h", o.name(), t - lat, x, y,
                     ea[t - lat], eb[t - lat]);
        end
      end
      @(posedge clk);
      #1;
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1;
    run(DP_CT, 13);
    run(DP_GS, 13);
    run(DP_MUL, 10);
    run(DP_ADD, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
