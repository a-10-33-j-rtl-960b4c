// Self-checking test of twiddle_rom for layer 0's prime: forward and inverse
// tables. Checks sampled entries against psi^brv(k) and psi^-brv(k) computed
// by square-and-multiply here, that entry k of the forward table times entry
// k of the inverse table is 1, that psi^4096 = -1 (entry 1 of the forward
// table, psi^2048, squares to q - 1 for a primitive 2N-th root), and the
// one-cycle read latency.
module tb_twiddle_rom;
  import he_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam coef_t Q = Q_TAB[0];
  logic [LOGN-1:0] addr = '0;
  coef_t df, di;
  twiddle_rom #(.W(W), .DEPTH(N), .Q(Q), .PSI(PSI_TAB[0]), .INV(1'b0)) u_f (
    .clk(clk), .addr(addr), .data(df));
  twiddle_rom #(.W(W), .DEPTH(N), .Q(Q), .PSI(PSI_TAB[0]), .INV(1'b1)) u_i (
    .clk(clk), .addr(addr), .data(di));

  function automatic longint unsigned mm(longint unsigned a, longint unsigned b);
    logic [127:0] t;
    t = 128'(a) * 128'(b);
    return 64'(t % 128'(Q));
  endfunction
  function automatic longint unsigned pw(longint unsigned b, int e);
    longint unsigned r = 1;
    while (e != 0) begin
      if (e[0]) r = mm(r, b);
      b = mm(b, b);
      e >>= 1;
    end
    return r;
  endfunction
  function automatic int brv(int x);
    int r = 0;
    for (int i = 0; i < LOGN; i++) r |= ((x >> i) & 1) << (LOGN - 1 - i);
    return r;
  endfunction

  task automatic chk(bit ok, string what, int k);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0d: fwd %h inv %h", what, k, df, di);
    end
  endtask

  initial begin
    longint unsigned psi = longint'(PSI_TAB[0]);
    longint unsigned psi_inv = pw(psi, 2 * N - 1);
    for (int k = 0; k < N; k += (k < 64 ? 1 : 37)) begin
      addr = LOGN'(k);
      @(posedge clk); #1;
      addr = ~addr;   // changing the address must not change the output now
      #1;
      chk(64'(df) == pw(psi, brv(k)), "forward", k);
      chk(64'(di) == pw(psi_inv, brv(k)), "inverse", k);
      chk(mm(64'(df), 64'(di)) == 1, "fwd*inv", k);
      if (k == 1) chk(mm(64'(df), 64'(df)) == longint'(Q) - 1, "psi^N = -1", k);
    end
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
