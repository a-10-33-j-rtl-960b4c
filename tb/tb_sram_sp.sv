// Self-checking test of sram_sp (2048 x 80): writes every word, reads them
// back in a shuffled order with one-cycle latency, checks that a write does
// not disturb the read output and that a disabled cycle holds it.
module tb_sram_sp;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic en = 1'b0, we = 1'b0;
  logic [10:0] addr = '0;
  logic [79:0] wdata = '0, rdata;
  sram_sp #(.DEPTH(2048), .WIDTH(80)) dut (.*);

  function automatic logic [79:0] pat(int i);
    return {16'(i * 5 + 3), 32'(i * 32'h61c88647), 32'(i ^ 32'h5a5a5a5a)};
  endfunction

  task automatic chk(logic [79:0] e, string what);
    checks++;
    if (rdata !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h exp %h", what, rdata, e);
    end
  endtask

  initial begin
    @(posedge clk); #1;
    for (int i = 0; i < 2048; i++) begin
      en = 1'b1; we = 1'b1; addr = 11'(i); wdata = pat(i);
      @(posedge clk); #1;
    end
    for (int i = 0; i < 2048; i++) begin
      automatic int a = (i * 1237) % 2048;
      en = 1'b1; we = 1'b0; addr = 11'(a);
      @(posedge clk); #1;
      chk(pat(a), "read");
    end
    // a write leaves the read register alone
    en = 1'b1; we = 1'b1; addr = 11'd3; wdata = '1;
    @(posedge clk); #1;
    chk(pat((2047 * 1237) % 2048), "write keeps rdata");
    en = 1'b0; we = 1'b0; addr = 11'd4;
    @(posedge clk); #1;
    chk(pat((2047 * 1237) % 2048), "idle keeps rdata");
    en = 1'b1; addr = 11'd3;
    @(posedge clk); #1;
    chk('1, "written word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
