// Global controller: runs encryption and decryption as sequences of
// polynomial passes and broadcasts one control word per cycle to all layers.
//
// Commands (cmd_e):
//   CMD_ENC_C1  NTT(NTTB); INTTB = NTTB.KEY; INTT(INTTB); INTTB += ERR   (c1)
//   CMD_ENC_C0  INTTB = NTTB.KEY; INTT(INTTB); INTTB += ERR             (c0)
//   CMD_DEC     NTT(NTTB); NTTB = NTTB.KEY; INTT(NTTB); INTTB = NTTB + INTTB
// where INTT is a pass of 12 Gentleman-Sande stages followed by a pass that
// scales by N^-1. The host loads u, P1, e2 before CMD_ENC_C1 and P0, e1
// before CMD_ENC_C0; NTT(u) stays in NTTB in between. For decryption it
// loads c1 into NTTB, NTT(s) into KEY and c0 into INTTB.
//
// Butterfly passes: 12 stages of 1024 cycles; each cycle reads the word pair
// whose addresses differ only in bit P of the 11-bit word address and writes
// the results back in place LAT_BF cycles later. Word address bits stand for
// coefficient index bits; the swap after each stage moves the meaning of one
// address bit, so the pair bit is P = 10-s (forward) or P = s (inverse) in
// stage s, and the last stage writes back without swap. Stages follow each
// other without draining the pipeline: the first pairs of a stage were
// written early in the stage before.
// Natural-order layout: word w = {x[w+2048], x[w]}. Forward-NTT output
// layout: word w = {X[2w+1], X[2w]}, X in bit-reversed order.
// Linear passes (multiply, scale, add) move word 0..2047, one per cycle.
//
// Timing: a pass of I read cycles with write latency LAT takes I + LAT
// cycles, and passes run back to back: NTT 12288+15 = 12303, dyadic product
// 2048+11 = 2059, INTT 12303+2059 = 14362, addition 2048+1 = 2049; the
// encryption of c1 and c0 takes 49243 cycles and a decryption 30773, as in
// the published schedule. busy is high for exactly those cycles after the
// command is taken (cmd_valid && cmd_ready); done pulses in the cycle after.
// The pass sequences and cycle counts follow the published schedule; the
// address order, the memory roles in decryption and the command interface
// are this design's choices.
module he_ctrl
  import he_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     cmd_valid,
  input  cmd_e     cmd,
  output logic     cmd_ready,
  output logic     busy,
  output logic     done,
  output lctrl_t   c,
  output poly_op_e cur_op        // pass in progress (valid while busy)
);
  localparam int unsigned STAGE_CYC = WORDS / 2;          // 1024 pairs per stage
  localparam int unsigned BF_ISSUE  = LOGN * STAGE_CYC;   // 12288
  localparam int unsigned LIN_ISSUE = WORDS;              // 2048
  localparam int unsigned DMAX      = LAT_BF;
  localparam int unsigned CW        = $clog2(BF_ISSUE + LAT_BF + 1);

  typedef struct packed {
    poly_op_e op;
    mem_sel_e src;
    mem_sel_e dst;
    logic     add_err;
  } pass_t;

  function automatic pass_t prog(cmd_e cm, int unsigned i);
    pass_t p;
    p = '{op: PO_ADD, src: MEM_NTTB, dst: MEM_INTTB, add_err: 1'b0};
    unique case (cm)
      CMD_ENC_C0: case (i)
        0: p = '{PO_MUL,   MEM_NTTB,  MEM_INTTB, 1'b0};
        1: p = '{PO_INTT,  MEM_INTTB, MEM_INTTB, 1'b0};
        2: p = '{PO_SCALE, MEM_INTTB, MEM_INTTB, 1'b0};
        default: p = '{PO_ADD, MEM_INTTB, MEM_INTTB, 1'b1};
      endcase
      CMD_DEC: case (i)
        0: p = '{PO_NTT,   MEM_NTTB,  MEM_NTTB,  1'b0};
        1: p = '{PO_MUL,   MEM_NTTB,  MEM_NTTB,  1'b0};
        2: p = '{PO_INTT,  MEM_NTTB,  MEM_NTTB,  1'b0};
        3: p = '{PO_SCALE, MEM_NTTB,  MEM_NTTB,  1'b0};
        default: p = '{PO_ADD, MEM_NTTB, MEM_INTTB, 1'b0};
      endcase
      default: case (i)
        0: p = '{PO_NTT,   MEM_NTTB,  MEM_NTTB,  1'b0};
        1: p = '{PO_MUL,   MEM_NTTB,  MEM_INTTB, 1'b0};
        2: p = '{PO_INTT,  MEM_INTTB, MEM_INTTB, 1'b0};
        3: p = '{PO_SCALE, MEM_INTTB, MEM_INTTB, 1'b0};
        default: p = '{PO_ADD, MEM_INTTB, MEM_INTTB, 1'b1};
      endcase
    endcase
    return p;
  endfunction

  function automatic int unsigned npasses(cmd_e cm);
    return (cm == CMD_ENC_C0) ? 4 : 5;
  endfunction

  function automatic int unsigned issue_len(poly_op_e op);
    return (op == PO_NTT || op == PO_INTT) ? BF_ISSUE : LIN_ISSUE;
  endfunction

  function automatic int unsigned lat_of(poly_op_e op);
    unique case (op)
      PO_NTT, PO_INTT:  return LAT_BF;
      PO_MUL, PO_SCALE: return LAT_MUL;
      default:          return LAT_ADD;
    endcase
  endfunction

  // word address with bit b inserted at position pos
  function automatic waddr_t ins_bit(logic [AW-2:0] j, int unsigned pos, logic b);
    waddr_t r;
    for (int i = 0; i < AW; i++) begin
      if (i < pos)       r[i] = j[i];
      else if (i == pos) r[i] = b;
      else               r[i] = j[i-1];
    end
    return r;
  endfunction

  // ----------------------------------------------------------------- state
  logic        running;
  cmd_e        cmd_q;
  logic [2:0]  pidx;
  logic [CW-1:0] cnt;           // cycle within the pass
  logic [2:0]  tag;             // pass sequence number, tags the delay line
  pass_t       pass;
  int unsigned issue, lat;

  always_comb begin
    pass  = prog(cmd_q, 32'(pidx));
    issue = issue_len(pass.op);
    lat   = lat_of(pass.op);
  end

  assign cmd_ready = !running;
  assign busy      = running;
  assign cur_op    = pass.op;

  logic last_cycle;
  assign last_cycle = running && (32'(cnt) == issue + lat - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      cmd_q   <= CMD_ENC_C1;
      pidx    <= '0;
      cnt     <= '0;
      tag     <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!running) begin
        if (cmd_valid) begin
          running <= 1'b1;
          cmd_q   <= cmd;
          pidx    <= '0;
          cnt     <= '0;
          tag     <= tag + 3'd1;
        end
      end else if (last_cycle) begin
        cnt <= '0;
        tag <= tag + 3'd1;
        if (32'(pidx) == npasses(cmd_q) - 1) begin
          running <= 1'b0;
          done    <= 1'b1;
        end else begin
          pidx <= pidx + 3'd1;
        end
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  // ----------------------------------------------------------------- read side
  typedef struct packed {
    logic   v;
    logic [2:0] tag;
    logic   pair;
    logic   swap;
    waddr_t a0;
    waddr_t a1;
  } wr_ent_t;

  logic        rd_v;
  logic        is_bf;
  logic [3:0]  stage;
  logic [AW-2:0] j;
  int unsigned pos;
  waddr_t      ax, ay;
  logic [LOGN-1:0] twx, twy;

  always_comb begin
    rd_v  = running && 32'(cnt) < issue;
    is_bf = pass.op == PO_NTT || pass.op == PO_INTT;
    stage = 4'(cnt >> (AW - 1));
    j     = cnt[AW-2:0];
    if (pass.op == PO_NTT) pos = (stage == 4'(LOGN - 1)) ? 0 : 32'(AW - 1) - 32'(stage);
    else                   pos = (stage == 4'(LOGN - 1)) ? AW - 1 : 32'(stage);
    if (is_bf) begin
      ax = ins_bit(j, pos, 1'b0);
      ay = ins_bit(j, pos, 1'b1);
    end else begin
      ax = cnt[AW-1:0];
      ay = '0;
    end
    // twiddle index: table[2^s + top s bits] (forward),
    //                table[2^(11-s) + top 11-s bits] (inverse)
    if (pass.op == PO_NTT) begin
      twx = (LOGN'(1) << stage) | LOGN'(ax >> (32'(AW) - 32'(stage)));
      twy = (LOGN'(1) << stage) | LOGN'(ay >> (32'(AW) - 32'(stage)));
    end else begin
      twx = (LOGN'(1) << (4'(LOGN - 1) - stage)) | LOGN'(ax >> stage);
      twy = (LOGN'(1) << (4'(LOGN - 1) - stage)) | LOGN'(ay >> stage);
    end
  end

  // ----------------------------------------------------------------- write side
  wr_ent_t dl [DMAX];
  wr_ent_t wr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DMAX; i++) dl[i] <= '0;
    end else begin
      dl[0] <= '{v: rd_v, tag: tag, pair: is_bf, swap: stage != 4'(LOGN - 1),
                 a0: ax, a1: ay};
      for (int i = 1; i < DMAX; i++) dl[i] <= dl[i-1];
    end
  end
  always_comb begin
    wr = dl[lat - 1];
    wr.v = wr.v && running && wr.tag == tag;
  end

  // ----------------------------------------------------------------- control word
  always_comb begin
    c          = '0;
    c.rd_en    = rd_v;
    c.rd_pair  = rd_v && is_bf;
    c.rd_addr0 = ax;
    c.rd_addr1 = ay;
    c.src      = pass.src;
    c.add_err  = pass.add_err;
    c.key_rd   = pass.op == PO_MUL;
    c.tw_addr0 = twx;
    c.tw_addr1 = twy;
    c.scale    = pass.op == PO_SCALE;
    unique case (pass.op)
      PO_NTT:           c.dp_op = DP_CT;
      PO_INTT:          c.dp_op = DP_GS;
      PO_MUL, PO_SCALE: c.dp_op = DP_MUL;
      default:          c.dp_op = DP_ADD;
    endcase
    c.wr_en    = wr.v;
    c.wr_pair  = wr.v && wr.pair;
    c.wr_swap  = wr.swap;
    c.wr_addr0 = wr.a0;
    c.wr_addr1 = wr.a1;
    c.dst      = pass.dst;
  end

  a_no_cmd_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
                                        busy |-> !(cmd_valid && cmd_ready));
endmodule
