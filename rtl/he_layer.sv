// One RNS layer of the engine: all storage and arithmetic for one prime q_L.
//
// Contents: an NTT buffer and an INTT buffer (poly_buffer, two 1024 x 80
// dual-port SRAMs each), a 2048 x 80 single-port key SRAM, four 4096 x 40
// twiddle ROMs (forward and inverse, one per datapath) and two bf_datapath
// units. Three such layers run in lockstep from one broadcast control word
// (lctrl_t); only the prime, its twiddles and its constants differ.
//
// Butterfly passes (PO_NTT / PO_INTT): each cycle the layer reads the word
// pair rd_addr0/rd_addr1 from the source buffer; each word holds the two
// coefficients of one butterfly, so datapath 0 works on word 0 and datapath 1
// on word 1. The four results go through the swap stage: with wr_swap the
// two "sum" outputs form the first written word and the two "difference"
// outputs the second, so the coefficients that meet in the next stage share a
// word again; without it each word is written back unchanged in position.
// Writes go back in place to wr_addr0/wr_addr1.
// Linear passes (PO_MUL, PO_SCALE, PO_ADD) move one word (two coefficients)
// per cycle through port 0: datapath 0 takes the low coefficient, datapath 1
// the high one. The multiplicand is the key word, or N^-1 for PO_SCALE; the
// addend is the error word or the INTT buffer word.
// The error SRAM is shared by all layers and holds each error coefficient as
// a signed 40-bit two's-complement value; this layer lifts it into [0, q_L).
//
// Host port: while the controller is idle the host reads or writes one word
// of NTTB, INTTB or KEY per cycle (h_en, h_we); read data one cycle later.
//
// Timing: the write side of the control word arrives LAT_BF / LAT_MUL /
// LAT_ADD cycles after the matching read side (see he_pkg).
// The organisation (buffers, key SRAM, ROMs, two datapaths, swap) follows the
// published architecture; the port list, error encoding and host port are
// this design's choices.
module he_layer
  import he_pkg::*;
#(
  parameter int unsigned L = 0     // layer index, selects the prime
) (
  input  logic     clk,
  input  lctrl_t   c,
  input  word_t    err_rdata,      // error SRAM word, one cycle after the read
  input  logic     h_en,
  input  logic     h_we,
  input  mem_sel_e h_mem,
  input  waddr_t   h_addr,
  input  word_t    h_wdata,
  output word_t    h_rdata
);
  localparam coef_t      Q    = Q_TAB[L];
  localparam logic [W:0] MU   = barrett_mu(L);
  localparam coef_t      NINV = ninv(L);
  localparam coef_t      PSI  = PSI_TAB[L];
  localparam int unsigned QB  = QB_TAB[L];

  // ---------------------------------------------------------------- buffers
  logic   nb_re [2], ib_re [2], nb_we [2], ib_we [2];
  waddr_t nb_ra [2], ib_ra [2], nb_wa [2], ib_wa [2];
  word_t  nb_rd [2], ib_rd [2], nb_wd [2], ib_wd [2];
  word_t  res_w [2];             // result words of the write side

  logic h_nb, h_ib, h_key;
  assign h_nb  = h_en && h_mem == MEM_NTTB;
  assign h_ib  = h_en && h_mem == MEM_INTTB;
  assign h_key = h_en && h_mem == MEM_KEY;

  always_comb begin
    // port 0: host or controller
    nb_re[0] = (h_nb && !h_we) || (c.rd_en && c.src == MEM_NTTB);
    ib_re[0] = (h_ib && !h_we) ||
               (c.rd_en && (c.src == MEM_INTTB || (c.dp_op == DP_ADD && !c.add_err)));
    nb_ra[0] = h_nb ? h_addr : c.rd_addr0;
    ib_ra[0] = h_ib ? h_addr : c.rd_addr0;
    nb_we[0] = (h_nb && h_we) || (c.wr_en && c.dst == MEM_NTTB);
    ib_we[0] = (h_ib && h_we) || (c.wr_en && c.dst == MEM_INTTB);
    nb_wa[0] = h_nb ? h_addr : c.wr_addr0;
    ib_wa[0] = h_ib ? h_addr : c.wr_addr0;
    nb_wd[0] = h_nb ? h_wdata : res_w[0];
    ib_wd[0] = h_ib ? h_wdata : res_w[0];
    // port 1: second word of a butterfly pair
    nb_re[1] = c.rd_en && c.rd_pair && c.src == MEM_NTTB;
    ib_re[1] = c.rd_en && c.rd_pair && c.src == MEM_INTTB;
    nb_ra[1] = c.rd_addr1;
    ib_ra[1] = c.rd_addr1;
    nb_we[1] = c.wr_en && c.wr_pair && c.dst == MEM_NTTB;
    ib_we[1] = c.wr_en && c.wr_pair && c.dst == MEM_INTTB;
    nb_wa[1] = c.wr_addr1;
    ib_wa[1] = c.wr_addr1;
    nb_wd[1] = res_w[1];
    ib_wd[1] = res_w[1];
  end

  poly_buffer u_nttb (.clk(clk), .re(nb_re), .raddr(nb_ra), .rdata(nb_rd),
                      .we(nb_we), .waddr(nb_wa), .wdata(nb_wd));
  poly_buffer u_inttb (.clk(clk), .re(ib_re), .raddr(ib_ra), .rdata(ib_rd),
                       .we(ib_we), .waddr(ib_wa), .wdata(ib_wd));

  // ---------------------------------------------------------------- key SRAM
  word_t key_rd;
  sram_sp #(.DEPTH(WORDS), .WIDTH(WW)) u_key (
    .clk(clk), .en(h_key || (c.rd_en && c.key_rd)), .we(h_key && h_we),
    .addr(h_key ? h_addr : c.rd_addr0), .wdata(h_wdata), .rdata(key_rd));

  // ---------------------------------------------------------------- ROMs
  coef_t tw_f [2], tw_i [2];
  for (genvar d = 0; d < 2; d++) begin : g_rom
    twiddle_rom #(.W(W), .DEPTH(N), .Q(Q), .PSI(PSI), .INV(1'b0)) u_ntt_rom (
      .clk(clk), .addr(d == 0 ? c.tw_addr0 : c.tw_addr1), .data(tw_f[d]));
    twiddle_rom #(.W(W), .DEPTH(N), .Q(Q), .PSI(PSI), .INV(1'b1)) u_intt_rom (
      .clk(clk), .addr(d == 0 ? c.tw_addr0 : c.tw_addr1), .data(tw_i[d]));
  end

  // ---------------------------------------------------------------- operands
  // selections registered to line up with the one-cycle memory read
  mem_sel_e src_q;
  logic     add_err_q, scale_q, h_rd_q;
  mem_sel_e h_mem_q;
  always_ff @(posedge clk) begin
    src_q     <= c.src;
    add_err_q <= c.add_err;
    scale_q   <= c.scale;
    h_rd_q    <= h_en && !h_we;
    h_mem_q   <= h_mem;
  end

  word_t opa [2];
  word_t addend;
  coef_t err_l [2];
  always_comb begin
    opa[0] = (src_q == MEM_INTTB) ? ib_rd[0] : nb_rd[0];
    opa[1] = (src_q == MEM_INTTB) ? ib_rd[1] : nb_rd[1];
    for (int i = 0; i < 2; i++) begin
      // signed error coefficient -> [0, q)
      err_l[i] = err_rdata[W*i + W-1] ? err_rdata[W*i +: W] + Q : err_rdata[W*i +: W];
    end
    addend = add_err_q ? {err_l[1], err_l[0]} : ib_rd[0];
  end

  coef_t dp_a [2], dp_b [2], dp_w [2], dp_x [2], dp_y [2];
  always_comb begin
    for (int d = 0; d < 2; d++) begin
      if (c.dp_op == DP_CT || c.dp_op == DP_GS) begin
        dp_a[d] = opa[d][W-1:0];
        dp_b[d] = opa[d][WW-1:W];
        dp_w[d] = (c.dp_op == DP_CT) ? tw_f[d] : tw_i[d];
      end else begin
        dp_a[d] = opa[0][W*d +: W];
        dp_b[d] = addend[W*d +: W];
        dp_w[d] = scale_q ? NINV : key_rd[W*d +: W];
      end
    end
  end

  for (genvar d = 0; d < 2; d++) begin : g_dp
    bf_datapath #(.QB(QB)) u_dp (
      .clk(clk), .op(c.dp_op), .a(dp_a[d]), .b(dp_b[d]), .w(dp_w[d]),
      .q(Q), .mu(MU), .x(dp_x[d]), .y(dp_y[d]));
  end

  // ---------------------------------------------------------------- swap stage
  coef_t sx [2], sy [2];
  always_ff @(posedge clk) begin
    sx <= dp_x;
    sy <= dp_y;
  end
  always_comb begin
    if (!c.wr_pair) begin
      res_w[0] = {dp_x[1], dp_x[0]};
      res_w[1] = '0;
    end else if (c.wr_swap) begin
      res_w[0] = {sx[1], sx[0]};
      res_w[1] = {sy[1], sy[0]};
    end else begin
      res_w[0] = {sy[0], sx[0]};
      res_w[1] = {sy[1], sx[1]};
    end
  end

  // ---------------------------------------------------------------- host read
  always_comb begin
    unique case (h_mem_q)
      MEM_NTTB:  h_rdata = nb_rd[0];
      MEM_INTTB: h_rdata = ib_rd[0];
      default:   h_rdata = key_rd;
    endcase
    if (!h_rd_q) h_rdata = '0;
  end
endmodule
