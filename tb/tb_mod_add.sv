// Self-checking test of mod_add: random and edge operands for the three
// primes, compared with (a + b) mod q computed in 64-bit arithmetic.
module tb_mod_add;
  import he_pkg::*;
  coef_t a, b, q, s;
  mod_add #(.W(W)) dut (.a(a), .b(b), .q(q), .s(s));
  int checks = 0, failures = 0;
  initial begin
    for (int i = 0; i < 3000; i++) begin
      longint unsigned qq, aa, bb, e;
      qq = longint'(Q_TAB[i % K]);
      aa = (i % 7 == 0) ? qq - 1 : {$urandom, $urandom} % qq;
      bb = (i % 5 == 0) ? qq - 1 : (i % 11 == 0) ? 0 : {$urandom, $urandom} % qq;
      a = W'(aa); b = W'(bb); q = W'(qq);
      #1;
      e = (aa + bb) % qq;
      checks++;
      if (64'(s) != e) begin
        failures++;
        if (failures < 10) $display("FAIL %h + %h mod %h = %h, exp %h", a, b, q, s, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
