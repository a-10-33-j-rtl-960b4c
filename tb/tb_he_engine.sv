// End-to-end test of the BFV client engine at full size (N = 4096, three
// primes), default parameters.
//
// Encryption: random ternary u, uniform public keys p1, p0 (coefficient form)
// and small signed errors e2, e1. The keys are loaded in NTT form, computed
// here with a textbook negacyclic Cooley-Tukey NTT. Expected results come
// from a schoolbook negacyclic product, independent of any NTT:
//   c1 = p1*u + e2, c0 = p0*u + e1 (mod q_l, each layer).
// Decryption: c1 and c0 from above and a ternary secret s; expected
//   mq = c0 + c1*s (mod q_l).
// Checks every coefficient of every layer, the busy cycle counts of each
// command (30773 + 18470 = 49243 for encryption, 30773 for decryption), and
// that the host port refuses accesses while busy. It counts how often each
// mechanism happened: forward/inverse butterfly passes, scaling, dyadic
// product, additions with the error SRAM and with the INTT buffer, swapped
// and unswapped pair write-backs, stage changes with writes of the previous
// stage still in flight, negative error coefficients, host back-pressure.
module tb_he_engine;
  import he_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     cmd_valid = 1'b0;
  cmd_e     cmd = CMD_ENC_C1;
  logic     cmd_ready, busy, done;
  poly_op_e cur_op;
  logic     h_valid = 1'b0, h_ready, h_we = 1'b0, h_rvalid;
  mem_sel_e h_mem = MEM_NTTB;
  logic [1:0] h_layer = '0;
  waddr_t   h_addr = '0;
  word_t    h_wdata = '0, h_rdata;

  he_engine dut (.*);

  int checks = 0, failures = 0;

  // ------------------------------------------------------------ reference math
  typedef longint unsigned poly_t [N];

  function automatic longint unsigned mulmod(longint unsigned a, longint unsigned b,
                                             longint unsigned q);
    logic [127:0] t;
    t = 128'(a) * 128'(b);
    return 64'(t % 128'(q));
  endfunction

  function automatic longint unsigned powmod(longint unsigned b, longint unsigned e,
                                             longint unsigned q);
    longint unsigned r = 1;
    while (e != 0) begin
      if (e[0]) r = mulmod(r, b, q);
      b = mulmod(b, b, q);
      e >>= 1;
    end
    return r;
  endfunction

  function automatic int brv(int x);
    int r = 0;
    for (int i = 0; i < LOGN; i++) r |= ((x >> i) & 1) << (LOGN - 1 - i);
    return r;
  endfunction

  // negacyclic forward NTT, natural order in, bit-reversed order out
  task automatic ref_ntt(ref poly_t a, input longint unsigned q, input longint unsigned psi);
    int t = N;
    for (int m = 1; m < N; m *= 2) begin
      t /= 2;
      for (int i = 0; i < m; i++) begin
        longint unsigned s = powmod(psi, longint'(brv(m + i)), q);
        for (int jj = 2 * i * t; jj < 2 * i * t + t; jj++) begin
          longint unsigned u = a[jj];
          longint unsigned v = mulmod(a[jj + t], s, q);
          a[jj]     = (u + v) % q;
          a[jj + t] = (u + q - v) % q;
        end
      end
    end
  endtask

  // r = a * t mod (x^N + 1, q) for ternary t (0, 1 or q-1)
  task automatic ref_mul_ternary(ref poly_t r, ref poly_t a, ref poly_t t,
                                 input longint unsigned q);
    for (int i = 0; i < N; i++) r[i] = 0;
    for (int jj = 0; jj < N; jj++) begin
      if (t[jj] == 0) continue;
      for (int i = 0; i < N; i++) begin
        int k = i + jj;
        bit neg = (t[jj] != 1);
        if (k >= N) begin k -= N; neg = !neg; end
        r[k] = neg ? (r[k] + q - a[i]) % q : (r[k] + a[i]) % q;
      end
    end
  endtask

  // ------------------------------------------------------------ host port
  task automatic hwrite(mem_sel_e m, int l, int a, word_t d);
    h_valid = 1'b1; h_we = 1'b1; h_mem = m; h_layer = 2'(l);
    h_addr = waddr_t'(a); h_wdata = d;
    @(posedge clk); #1;
    h_valid = 1'b0; h_we = 1'b0;
  endtask

  task automatic hread(mem_sel_e m, int l, int a, output word_t d);
    h_valid = 1'b1; h_we = 1'b0; h_mem = m; h_layer = 2'(l);
    h_addr = waddr_t'(a);
    @(posedge clk); #1;
    h_valid = 1'b0;
    if (!h_rvalid) begin
      failures++;
      $display("FAIL: no h_rvalid");
    end
    d = h_rdata;
  endtask

  // coefficient-form polynomial: word w = {x[w+2048], x[w]}
  poly_t xfer;      // polynomial handed to / from the host tasks
  poly_t got;

  task automatic load_coef(mem_sel_e m, int l);
    for (int w = 0; w < WORDS; w++)
      hwrite(m, l, w, {W'(xfer[w + WORDS]), W'(xfer[w])});
  endtask

  // NTT-form polynomial: word w = {X[2w+1], X[2w]}
  task automatic load_ntt(int l);
    ref_ntt(xfer, longint'(Q_TAB[l]), longint'(PSI_TAB[l]));
    for (int w = 0; w < WORDS; w++)
      hwrite(MEM_KEY, l, w, {W'(xfer[2 * w + 1]), W'(xfer[2 * w])});
  endtask

  // signed error: word w = {e[w+2048], e[w]}, 40-bit two's complement
  int eload [N];
  task automatic load_err();
    for (int w = 0; w < WORDS; w++)
      hwrite(MEM_ERR, 0, w, {W'(eload[w + WORDS]), W'(eload[w])});
  endtask

  // compares INTTB of layer l with xfer, leaves the coefficients in got
  task automatic check_result(string name, int l);
    word_t d;
    int bad = 0;
    for (int w = 0; w < WORDS; w++) begin
      hread(MEM_INTTB, l, w, d);
      got[w]         = longint'(d[W-1:0]);
      got[w + WORDS] = longint'(d[WW-1:W]);
      for (int h = 0; h < 2; h++) begin
        int i = w + h * WORDS;
        checks++;
        if (got[i] != xfer[i]) begin
          failures++;
          if (bad < 5) $display("FAIL %s layer %0d coef %0d: got %h exp %h", name, l, i,
                                got[i], xfer[i]);
          bad++;
        end
      end
    end
    $display("%s layer %0d: %0d mismatches", name, l, bad);
  endtask

  task automatic run_cmd(cmd_e cm, int exp_cycles);
    int cyc = 0;
    cmd_valid = 1'b1; cmd = cm;
    @(posedge clk); #1;
    cmd_valid = 1'b0;
    // the host port must be refused while busy
    h_valid = 1'b1; h_we = 1'b1; h_mem = MEM_KEY; h_layer = 2'd0; h_addr = '0;
    h_wdata = '1;
    while (busy) begin
      if (h_valid && !h_ready) n_backpressure++;
      @(posedge clk); #1;
      cyc++;
      if (cyc == 4) h_valid = 1'b0;
    end
    h_valid = 1'b0;
    checks++;
    if (cyc != exp_cycles) begin
      failures++;
      $display("FAIL cycles of %s: %0d, expected %0d", cm.name(), cyc, exp_cycles);
    end else $display("%s: %0d cycles", cm.name(), cyc);
    checks++;
    if (!done) begin failures++; $display("FAIL: no done pulse"); end
  endtask

  // ------------------------------------------------------------ mechanism counters
  int n_ntt = 0, n_intt = 0, n_scale = 0, n_mul = 0, n_add_err = 0, n_add_buf = 0;
  int n_swap = 0, n_noswap = 0, n_overlap = 0, n_negerr = 0, n_backpressure = 0;
  poly_op_e prev_op;
  logic prev_busy = 1'b0;
  logic [3:0] prev_stage;
  always @(posedge clk) begin
    if (busy && (!prev_busy || cur_op != prev_op)) begin
      case (cur_op)
        PO_NTT:   n_ntt++;
        PO_INTT:  n_intt++;
        PO_SCALE: n_scale++;
        PO_MUL:   n_mul++;
        default:  if (dut.c.add_err) n_add_err++; else n_add_buf++;
      endcase
    end
    if (dut.c.wr_en && dut.c.wr_pair) begin
      if (dut.c.wr_swap) n_swap++; else n_noswap++;
    end
    // a new stage is read while the previous stage still writes back
    if (busy && dut.c.rd_pair && dut.u_ctrl.stage != prev_stage && dut.c.wr_en &&
        dut.u_ctrl.stage != 0)
      n_overlap++;
    prev_stage <= dut.u_ctrl.stage;
    prev_busy  <= busy;
    prev_op    <= cur_op;
  end

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL: %s never happened", what); end
    else $display("%s: %0d", what, n);
  endtask

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ stimulus
  poly_t u [K], p1 [K], p0 [K], c1 [K], c0 [K], s [K], exp_p [K];
  int e1 [N], e2 [N];

  initial begin
    for (int i = 0; i < N; i++) begin
      automatic int r = int'($urandom_range(0, 2));
      automatic int rs = int'($urandom_range(0, 2));
      e1[i] = int'($urandom_range(0, 40)) - 20;
      e2[i] = int'($urandom_range(0, 40)) - 20;
      if (e1[i] < 0) n_negerr++;
      for (int l = 0; l < K; l++) begin
        automatic longint unsigned q = longint'(Q_TAB[l]);
        u[l][i]  = (r == 2) ? q - 1 : longint'(r);
        s[l][i]  = (rs == 2) ? q - 1 : longint'(rs);
        p1[l][i] = {$urandom, $urandom} % q;
        p0[l][i] = {$urandom, $urandom} % q;
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;

    // ---- encryption, first component
    for (int l = 0; l < K; l++) begin
      xfer = u[l];  load_coef(MEM_NTTB, l);
      xfer = p1[l]; load_ntt(l);
    end
    eload = e2;
    load_err();
    begin
      word_t d;
      hread(MEM_NTTB, 1, 5, d);
      checks++;
      if (d != {u[1][5+2048][W-1:0], u[1][5][W-1:0]}) begin
        failures++; $display("FAIL: host write does not reach layer 1");
      end
    end
    run_cmd(CMD_ENC_C1, 30773);
    // NTTB keeps U = NTT(u), in the NTT layout
    for (int l = 0; l < K; l++) begin
      word_t d;
      int bad;
      bad = 0;
      xfer = u[l];
      ref_ntt(xfer, longint'(Q_TAB[l]), longint'(PSI_TAB[l]));
      for (int w = 0; w < WORDS; w++) begin
        hread(MEM_NTTB, l, w, d);
        checks++;
        if (d != {W'(xfer[2 * w + 1]), W'(xfer[2 * w])}) begin
          failures++;
          if (bad < 5) $display("FAIL NTT(u) layer %0d word %0d: got %h exp %h", l, w, d,
                                {W'(xfer[2 * w + 1]), W'(xfer[2 * w])});
          bad++;
        end
      end
      $display("NTT(u) layer %0d: %0d mismatches", l, bad);
    end
    for (int l = 0; l < K; l++) begin
      automatic longint unsigned q = longint'(Q_TAB[l]);
      ref_mul_ternary(exp_p[l], p1[l], u[l], q);
      for (int i = 0; i < N; i++) exp_p[l][i] = (exp_p[l][i] + q + longint'(e2[i])) % q;
      xfer = exp_p[l];
      check_result("c1", l);
      c1[l] = got;
    end

    // ---- encryption, second component
    for (int l = 0; l < K; l++) begin
      xfer = p0[l]; load_ntt(l);
    end
    eload = e1;
    load_err();
    run_cmd(CMD_ENC_C0, 18470);
    for (int l = 0; l < K; l++) begin
      automatic longint unsigned q = longint'(Q_TAB[l]);
      ref_mul_ternary(exp_p[l], p0[l], u[l], q);
      for (int i = 0; i < N; i++) exp_p[l][i] = (exp_p[l][i] + q + longint'(e1[i])) % q;
      xfer = exp_p[l];
      check_result("c0", l);
      c0[l] = got;
    end

    // ---- decryption
    for (int l = 0; l < K; l++) begin
      xfer = c1[l]; load_coef(MEM_NTTB, l);
      xfer = c0[l]; load_coef(MEM_INTTB, l);
      xfer = s[l];  load_ntt(l);
    end
    run_cmd(CMD_DEC, 30773);
    for (int l = 0; l < K; l++) begin
      automatic longint unsigned q = longint'(Q_TAB[l]);
      ref_mul_ternary(exp_p[l], c1[l], s[l], q);
      for (int i = 0; i < N; i++) exp_p[l][i] = (exp_p[l][i] + c0[l][i]) % q;
      xfer = exp_p[l];
      check_result("mq", l);
    end

    need("forward NTT passes", n_ntt);
    need("inverse NTT passes", n_intt);
    need("N^-1 scaling passes", n_scale);
    need("dyadic products", n_mul);
    need("additions of the error", n_add_err);
    need("additions of the INTT buffer", n_add_buf);
    need("swapped pair write-backs", n_swap);
    need("unswapped pair write-backs (last stage)", n_noswap);
    need("stage changes with writes in flight", n_overlap);
    need("negative error coefficients", n_negerr);
    need("host accesses refused while busy", n_backpressure);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
