// Self-checking test of barrett_mult for each of the three primes: a stream
// of random and edge operands (0, 1, q-1), one per cycle, each product
// checked against (a*b) mod q exactly 10 cycles later.
module tb_barrett_mult;
  import he_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  coef_t a [K], b [K], p [K];
  for (genvar l = 0; l < K; l++) begin : g_l
    barrett_mult #(.W(W), .QB(QB_TAB[l]), .LAT(10)) dut (
      .clk(clk), .a(a[l]), .b(b[l]), .q(Q_TAB[l]), .mu(barrett_mu(l)), .p(p[l]));
  end

  localparam int NV = 2000;
  coef_t exp_p [K][NV];

  function automatic coef_t pick(int l, int i);
    longint unsigned q = longint'(Q_TAB[l]);
    case (i % 13)
      0: return '0;
      1: return 40'd1;
      2, 3: return W'(q - 1);
      default: return W'({$urandom, $urandom} % q);
    endcase
  endfunction

  initial begin
    #1;
    for (int t = 0; t < NV + 10; t++) begin
      for (int l = 0; l < K; l++) begin
        if (t < NV) begin
          logic [79:0] m;
          a[l] = pick(l, t);
          b[l] = pick(l, t + $urandom_range(0, 3));
          m = 80'(a[l]) * 80'(b[l]);
          exp_p[l][t] = W'(m % 80'(Q_TAB[l]));
        end
        if (t >= 10) begin
          checks++;
          if (p[l] != exp_p[l][t - 10]) begin
            failures++;
            if (failures < 10) $display("FAIL layer %0d item %0d: %h exp %h", l, t - 10, p[l],
                                        exp_p[l][t - 10]);
          end
        end
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (NV + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
