// Self-checking test of sram_dp (1024 x 80): fills the array through the
// write port while reading back earlier words through the read port in the
// same cycles, checks one-cycle read latency, that a disabled read holds its
// output, and the read-old-data rule when both ports hit one address.
module tb_sram_dp;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic re = 1'b0, we = 1'b0;
  logic [9:0] raddr = '0, waddr = '0;
  logic [79:0] rdata, wdata = '0;
  sram_dp #(.DEPTH(1024), .WIDTH(80)) dut (.*);

  function automatic logic [79:0] pat(int i, int k);
    return {16'(i * 7 + k), 32'(i * 32'h9e3779b9 + k), 32'(~i ^ k)};
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
    // write word i while reading word i-1 (written last cycle)
    for (int i = 0; i < 1024; i++) begin
      we = 1'b1; waddr = 10'(i); wdata = pat(i, 1);
      re = (i > 0); raddr = 10'(i - 1);
      @(posedge clk); #1;
      if (i > 0) chk(pat(i - 1, 1), "read after write");
    end
    we = 1'b0;
    // random reads
    for (int n = 0; n < 500; n++) begin
      automatic int a = int'($urandom_range(0, 1023));
      re = 1'b1; raddr = 10'(a);
      @(posedge clk); #1;
      chk(pat(a, 1), "random read");
    end
    // disabled read keeps the output
    re = 1'b0;
    begin
      logic [79:0] held;
      held = rdata;
      raddr = 10'd9;
      @(posedge clk); #1;
      chk(held, "disabled read holds");
    end
    // same-address read and write: old data, then new data
    re = 1'b1; raddr = 10'd77; we = 1'b1; waddr = 10'd77; wdata = pat(77, 2);
    @(posedge clk); #1;
    chk(pat(77, 1), "read-old-data");
    we = 1'b0;
    @(posedge clk); #1;
    chk(pat(77, 2), "new data");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
