// Self-checking test of he_ctrl. Runs CMD_ENC_C1, CMD_ENC_C0 and CMD_DEC and
// checks, against a model kept here:
//  - the pass sequence of each command and the busy cycle count of each
//    pass (NTT/INTT butterflies 12303, products 2059, additions 2049) and
//    command (30773, 18470, 30773);
//  - for butterfly passes, which coefficient index every word holds: the
//    model starts from the natural (forward) or NTT (inverse) layout and
//    applies each write-back with or without swap. Every read pair must hold
//    two butterfly partners of the current stage (indices 2^(11-s) apart
//    forward, 2^s apart inverse), each word must be read once per stage, no
//    word may be read while a write to it is still in flight, the twiddle
//    addresses must be the textbook table indices, and the pass must end in
//    the expected layout;
//  - for linear passes, sequential addresses, operand selects and a write
//    of every word exactly LAT cycles after its read.
module tb_he_ctrl;
  import he_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic     rst_n = 1'b0, cmd_valid = 1'b0;
  cmd_e     cmd = CMD_ENC_C1;
  logic     cmd_ready, busy, done;
  lctrl_t   c;
  poly_op_e cur_op;
  he_ctrl dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------------------------------------------------------- model
  logic [LOGN-1:0] loc [WORDS][2];  // coefficient index held by word/slot
  int  pending [WORDS];             // writes in flight per word
  int  seen [WORDS];                // reads in the current stage
  int  rd_cnt;                      // reads in the current pass
  int  wr_cnt;
  poly_op_e op_q;
  logic busy_q = 1'b0;
  int  pass_cycles;
  waddr_t rq0 [$], rq1 [$];         // addresses read, in order
  int  lat;

  function automatic int latency(poly_op_e o);
    if (o == PO_NTT || o == PO_INTT) return 15;
    if (o == PO_MUL || o == PO_SCALE) return 11;
    return 1;
  endfunction

  task automatic start_pass(poly_op_e o);
    for (int w = 0; w < WORDS; w++) begin
      pending[w] = 0;
      seen[w] = 0;
      if (o == PO_NTT) begin
        loc[w][0] = LOGN'(w); loc[w][1] = LOGN'(w + WORDS);
      end else begin
        loc[w][0] = LOGN'(2 * w); loc[w][1] = LOGN'(2 * w + 1);
      end
    end
    rd_cnt = 0; wr_cnt = 0;
    rq0.delete(); rq1.delete();
    lat = latency(o);
  endtask

  task automatic end_pass(poly_op_e o, int cyc);
    int bad = 0;
    chk(cyc == ((o == PO_NTT || o == PO_INTT) ? 12303 : (o == PO_ADD ? 2049 : 2059)),
        $sformatf("%s pass length %0d", o.name(), cyc));
    chk(wr_cnt == rd_cnt, "every read written back");
    if (o == PO_NTT || o == PO_INTT) begin
      for (int w = 0; w < WORDS; w++) begin
        if (o == PO_NTT && (loc[w][0] != LOGN'(2 * w) || loc[w][1] != LOGN'(2 * w + 1))) bad++;
        if (o == PO_INTT && (loc[w][0] != LOGN'(w) || loc[w][1] != LOGN'(w + WORDS))) bad++;
      end
      chk(bad == 0, $sformatf("%s final layout (%0d words wrong)", o.name(), bad));
    end
  endtask

  int s_rd;
  always @(posedge clk) if (rst_n) begin   // flops are random until reset takes
    if (busy && (!busy_q || cur_op != op_q)) begin
      if (busy_q) end_pass(op_q, pass_cycles);
      start_pass(cur_op);
      pass_cycles = 0;
    end
    if (!busy && busy_q) end_pass(op_q, pass_cycles);
    if (busy) pass_cycles++;

    // ---- write side (before reads: a write and a read in one cycle are fine)
    if (c.wr_en) begin
      waddr_t e0, e1;
      e0 = rq0.pop_front();
      e1 = rq1.pop_front();
      wr_cnt++;
      chk(c.wr_addr0 == e0, "write address 0 follows its read");
      if (c.wr_pair) begin
        logic [LOGN-1:0] x0, x1, y0, y1;
        chk(c.wr_addr1 == e1, "write address 1 follows its read");
        x0 = loc[c.wr_addr0][0]; x1 = loc[c.wr_addr0][1];
        y0 = loc[c.wr_addr1][0]; y1 = loc[c.wr_addr1][1];
        if (c.wr_swap) begin
          loc[c.wr_addr0][1] = y0;
          loc[c.wr_addr1][0] = x1;
        end
        pending[c.wr_addr0]--;
        pending[c.wr_addr1]--;
      end
    end

    // ---- read side
    if (c.rd_en) begin
      s_rd = rd_cnt / 1024;
      if (c.rd_pair) begin
        waddr_t x, y;
        int s, pdist;
        x = c.rd_addr0; y = c.rd_addr1;
        s = s_rd;
        if (rd_cnt % 1024 == 0) for (int w = 0; w < WORDS; w++) seen[w] = 0;
        pdist = (cur_op == PO_NTT) ? (1 << (LOGN - 1 - s)) : (1 << s);
        chk(32'(loc[x][1]) - 32'(loc[x][0]) == pdist && 32'(loc[y][1]) - 32'(loc[y][0]) == pdist,
            $sformatf("stage %0d pair holds butterfly partners", s));
        chk(seen[x] == 0 && seen[y] == 0, "word read once per stage");
        chk(pending[x] == 0 && pending[y] == 0, "no read of a word with a write in flight");
        seen[x]++; seen[y]++;
        pending[x]++; pending[y]++;
        if (cur_op == PO_NTT) begin
          chk(c.tw_addr0 == LOGN'((1 << s) + (32'(loc[x][0]) >> (LOGN - s))) &&
              c.tw_addr1 == LOGN'((1 << s) + (32'(loc[y][0]) >> (LOGN - s))),
              "forward twiddle index");
          chk(c.dp_op == DP_CT, "CT butterfly selected");
        end else begin
          chk(c.tw_addr0 == LOGN'((1 << (LOGN - 1 - s)) + (32'(loc[x][0]) >> (s + 1))) &&
              c.tw_addr1 == LOGN'((1 << (LOGN - 1 - s)) + (32'(loc[y][0]) >> (s + 1))),
              "inverse twiddle index");
          chk(c.dp_op == DP_GS, "GS butterfly selected");
        end
      end else begin
        chk(c.rd_addr0 == waddr_t'(rd_cnt), "linear address");
        chk(c.key_rd == (cur_op == PO_MUL), "key read only in the product");
        chk(c.scale == (cur_op == PO_SCALE), "N^-1 only in the scaling");
        chk(c.dp_op == ((cur_op == PO_ADD) ? DP_ADD : DP_MUL), "linear datapath op");
      end
      rq0.push_back(c.rd_addr0);
      rq1.push_back(c.rd_addr1);
      rd_cnt++;
    end
    op_q   <= cur_op;
    busy_q <= busy;
  end

  // ---------------------------------------------------------------- stimulus
  poly_op_e seq [$];
  always @(posedge clk)
    if (rst_n && busy && (!busy_q || cur_op != op_q)) seq.push_back(cur_op);

  task automatic run(cmd_e cm, int exp_cyc, string exp_seq);
    int cyc = 0;
    string got = "";
    seq.delete();
    cmd_valid = 1'b1; cmd = cm;
    @(posedge clk); #1;
    cmd_valid = 1'b0;
    chk(busy && !cmd_ready, "busy after the command");
    while (busy) begin
      @(posedge clk); #1;
      cyc++;
    end
    chk(done, "done pulse");
    chk(cyc == exp_cyc, $sformatf("%s takes %0d cycles", cm.name(), cyc));
    foreach (seq[i]) got = {got, seq[i].name(), " "};
    chk(got == exp_seq, $sformatf("%s sequence: %s", cm.name(), got));
    @(posedge clk); #1;
    chk(!done, "done is a pulse");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    chk(cmd_ready && !busy, "idle after reset");
    run(CMD_ENC_C1, 30773, "PO_NTT PO_MUL PO_INTT PO_SCALE PO_ADD ");
    run(CMD_ENC_C0, 18470, "PO_MUL PO_INTT PO_SCALE PO_ADD ");
    run(CMD_DEC, 30773, "PO_NTT PO_MUL PO_INTT PO_SCALE PO_ADD ");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
