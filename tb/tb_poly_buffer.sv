// Self-checking test of poly_buffer: fills all 2048 words through port 0,
// then reads and rewrites random word pairs whose addresses differ in one bit
// through both ports at once (the butterfly access pattern), keeping a model
// of the contents here, and finally reads everything back through port 1.
module tb_poly_buffer;
  import he_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic   re [2], we [2];
  waddr_t raddr [2], waddr [2];
  word_t  rdata [2], wdata [2];
  poly_buffer dut (.*);

  word_t model [WORDS];

  task automatic idle();
    re[0] = 1'b0; re[1] = 1'b0; we[0] = 1'b0; we[1] = 1'b0;
  endtask

  task automatic chk(word_t got, word_t e, string what);
    checks++;
    if (got !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h exp %h", what, got, e);
    end
  endtask

  initial begin
    idle();
    raddr[0] = '0; raddr[1] = '0; waddr[0] = '0; waddr[1] = '0;
    wdata[0] = '0; wdata[1] = '0;
    @(posedge clk); #1;
    for (int w = 0; w < WORDS; w++) begin
      model[w] = {$urandom, $urandom, 16'($urandom)};
      we[0] = 1'b1; waddr[0] = waddr_t'(w); wdata[0] = model[w];
      @(posedge clk); #1;
    end
    idle();
    // pair read at cycle t, pair write of new values at cycle t+1
    for (int n = 0; n < 3000; n++) begin
      automatic int x = int'($urandom_range(0, WORDS - 1));
      automatic int bitp = int'($urandom_range(0, AW - 1));
      automatic int y = x ^ (1 << bitp);
      re[0] = 1'b1; raddr[0] = waddr_t'(x);
      re[1] = 1'b1; raddr[1] = waddr_t'(y);
      we[0] = 1'b0; we[1] = 1'b0;
      @(posedge clk); #1;
      chk(rdata[0], model[x], "pair read 0");
      chk(rdata[1], model[y], "pair read 1");
      model[x] = {$urandom, $urandom, 16'($urandom)};
      model[y] = {$urandom, $urandom, 16'($urandom)};
      re[0] = 1'b0; re[1] = 1'b0;
      we[0] = 1'b1; waddr[0] = waddr_t'(y); wdata[0] = model[y];
      we[1] = 1'b1; waddr[1] = waddr_t'(x); wdata[1] = model[x];
      @(posedge clk); #1;
      idle();
    end
    for (int w = 0; w < WORDS; w++) begin
      re[1] = 1'b1; raddr[1] = waddr_t'(w);
      @(posedge clk); #1;
      chk(rdata[1], model[w], "final read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
