// Self-checking test of he_layer (layer 1's prime), driving the broadcast
// control word directly, the way he_ctrl does, with the documented write
// latencies (15 butterfly, 11 product, 1 addition). Passes and checks:
//   product  INTTB = NTTB . KEY           (datapath 0 low, 1 high coefficient)
//   scale    INTTB = INTTB . N^-1, in place
//   add      INTTB = INTTB + ERR          (signed error lifted into [0, q))
//   add      INTTB = NTTB + INTTB
//   CT stage on NTTB, pairs (j, j+1024), with swap
//   GS stage on NTTB, pairs (j, j+1024), without swap
// Expected values are computed here from the loaded data; results are read
// back through the host port.
module tb_he_layer;
  import he_pkg::*;
  localparam int unsigned L = 1;
  localparam longint unsigned Q = longint'(Q_TAB[L]);

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  lctrl_t   c;
  word_t    err_rdata;
  logic     h_en = 1'b0, h_we = 1'b0;
  mem_sel_e h_mem = MEM_NTTB;
  waddr_t   h_addr = '0;
  word_t    h_wdata = '0, h_rdata;

  he_layer #(.L(L)) dut (.*);

  // error SRAM of the top level, modelled here
  word_t err_mem [WORDS];
  always @(posedge clk) if (c.rd_en && c.add_err && c.dp_op == DP_ADD) err_rdata <= err_mem[c.rd_addr0];

  function automatic longint unsigned mm(longint unsigned a, longint unsigned b);
    logic [127:0] t;
    t = 128'(a) * 128'(b);
    return 64'(t % 128'(Q));
  endfunction
  function automatic longint unsigned pw(longint unsigned b, longint unsigned e);
    longint unsigned r = 1;
    while (e != 0) begin
      if (e[0]) r = mm(r, b);
      b = mm(b, b);
      e >>= 1;
    end
    return r;
  endfunction

  longint unsigned a_m [N], k_m [N], i_m [N];   // model of NTTB, KEY, INTTB
  int e_m [N];

  task automatic hw(mem_sel_e m, int w, word_t d);
    h_en = 1'b1; h_we = 1'b1; h_mem = m; h_addr = waddr_t'(w); h_wdata = d;
    @(posedge clk); #1;
    h_en = 1'b0; h_we = 1'b0;
  endtask
  task automatic hr(mem_sel_e m, int w, output word_t d);
    h_en = 1'b1; h_we = 1'b0; h_mem = m; h_addr = waddr_t'(w);
    @(posedge clk); #1;
    h_en = 1'b0;
    d = h_rdata;
  endtask

  // word w holds coefficients w (low) and w + 2048 (high) of the model
  task automatic compare(mem_sel_e m, string what);
    word_t d;
    int bad;
    bad = 0;
    for (int w = 0; w < WORDS; w++) begin
      longint unsigned lo, hi;
      hr(m, w, d);
      lo = (m == MEM_NTTB) ? a_m[w] : i_m[w];
      hi = (m == MEM_NTTB) ? a_m[w + WORDS] : i_m[w + WORDS];
      checks++;
      if (64'(d[W-1:0]) != lo || 64'(d[WW-1:W]) != hi) begin
        failures++;
        if (bad < 4) $display("FAIL %s word %0d: %h exp %h %h", what, w, d, hi, lo);
        bad++;
      end
    end
    $display("%s: %0d words wrong", what, bad);
  endtask

  // one pass: linear (2048 words) or one butterfly stage on pairs (j, j+1024)
  task automatic pass(dp_op_e op, mem_sel_e src, mem_sel_e dst, bit key, bit scale,
                      bit add_err, bit swap);
    bit bf = (op == DP_CT || op == DP_GS);
    int issue = bf ? WORDS / 2 : WORDS;
    int lat = bf ? 15 : (op == DP_ADD ? 1 : 11);
    for (int t = 0; t < issue + lat; t++) begin
      c = '0;
      c.dp_op = op; c.src = src; c.dst = dst; c.key_rd = key; c.scale = scale;
      c.add_err = add_err;
      if (t < issue) begin
        c.rd_en = 1'b1; c.rd_pair = bf;
        c.rd_addr0 = waddr_t'(t);
        c.rd_addr1 = waddr_t'(t + WORDS / 2);
        c.tw_addr0 = LOGN'(1); c.tw_addr1 = LOGN'(1);
      end
      if (t >= lat) begin
        c.wr_en = 1'b1; c.wr_pair = bf; c.wr_swap = swap;
        c.wr_addr0 = waddr_t'(t - lat);
        c.wr_addr1 = waddr_t'(t - lat + WORDS / 2);
      end
      @(posedge clk); #1;
    end
    c = '0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned ninv_v, wf, wi, psi;
    c = '0;
    psi = longint'(PSI_TAB[L]);
    for (int i = 0; i < N; i++) begin
      a_m[i] = {$urandom, $urandom} % Q;
      k_m[i] = (i % 97 == 0) ? Q - 1 : {$urandom, $urandom} % Q;
      e_m[i] = int'($urandom_range(0, 64)) - 32;
    end
    for (int w = 0; w < WORDS; w++) begin
      hw(MEM_NTTB, w, {W'(a_m[w + WORDS]), W'(a_m[w])});
      hw(MEM_KEY,  w, {W'(k_m[w + WORDS]), W'(k_m[w])});
      err_mem[w] = {W'(e_m[w + WORDS]), W'(e_m[w])};
    end
    compare(MEM_NTTB, "host write/read");

    pass(DP_MUL, MEM_NTTB, MEM_INTTB, 1'b1, 1'b0, 1'b0, 1'b0);
    for (int i = 0; i < N; i++) i_m[i] = mm(a_m[i], k_m[i]);
    compare(MEM_INTTB, "product");

    pass(DP_MUL, MEM_INTTB, MEM_INTTB, 1'b0, 1'b1, 1'b0, 1'b0);
    ninv_v = Q - (Q - 1) / N;
    for (int i = 0; i < N; i++) i_m[i] = mm(i_m[i], ninv_v);
    compare(MEM_INTTB, "scale by N^-1");

    pass(DP_ADD, MEM_INTTB, MEM_INTTB, 1'b0, 1'b0, 1'b1, 1'b0);
    for (int i = 0; i < N; i++) i_m[i] = (i_m[i] + Q + longint'(e_m[i])) % Q;
    compare(MEM_INTTB, "add error");

    pass(DP_ADD, MEM_NTTB, MEM_INTTB, 1'b0, 1'b0, 1'b0, 1'b0);
    for (int i = 0; i < N; i++) i_m[i] = (i_m[i] + a_m[i]) % Q;
    compare(MEM_INTTB, "add buffers");

    // CT stage, pairs x = j, y = j + 1024; twiddle entry 1 = psi^2048
    wf = pw(psi, 2048);
    pass(DP_CT, MEM_NTTB, MEM_NTTB, 1'b0, 1'b0, 1'b0, 1'b1);
    for (int j = 0; j < WORDS / 2; j++) begin
      longint unsigned a0, b0, a1, b1, p0, p1;
      a0 = a_m[j]; b0 = a_m[j + WORDS]; a1 = a_m[j + 1024]; b1 = a_m[j + 1024 + WORDS];
      p0 = mm(b0, wf); p1 = mm(b1, wf);
      a_m[j]               = (a0 + p0) % Q;       // x word: {A1, A0}
      a_m[j + WORDS]       = (a1 + p1) % Q;
      a_m[j + 1024]        = (a0 + Q - p0) % Q;   // y word: {B1, B0}
      a_m[j + 1024 + WORDS] = (a1 + Q - p1) % Q;
    end
    compare(MEM_NTTB, "CT stage with swap");

    // GS stage without swap; inverse twiddle entry 1 = psi^-2048
    wi = pw(pw(psi, 2 * N - 1), 2048);
    pass(DP_GS, MEM_NTTB, MEM_NTTB, 1'b0, 1'b0, 1'b0, 1'b0);
    for (int w = 0; w < WORDS; w++) begin
      longint unsigned a0, b0;
      a0 = a_m[w]; b0 = a_m[w + WORDS];
      a_m[w]         = (a0 + b0) % Q;
      a_m[w + WORDS] = mm((a0 + Q - b0) % Q, wi);
    end
    compare(MEM_NTTB, "GS stage without swap");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
