// BFV client encryption/decryption engine, top level.
//
// Computes the "zero encryption" of the BFV scheme, c1 = [P1*u + e2]_q and
// c0 = [P0*u + e1]_q, and the decryption product mq = [c0 + c1*s]_q, for
// polynomials of degree N = 4096 whose 109-bit modulus is represented by
// three RNS primes. Products are taken in the NTT domain: the input u (or c1)
// is transformed once, multiplied coefficient-wise with the key, transformed
// back and the error (or c0) added.
//
// Structure: three he_layer instances, one per prime, driven in lockstep by
// one he_ctrl; one 2048 x 80 error SRAM shared by the layers (error
// coefficients are small signed values, identical for every prime).
//
// Host port (valid/ready, usable while the engine is idle): each accepted
// beat reads or writes one 80-bit word (two coefficients) of one memory:
// h_mem selects NTTB, INTTB, KEY or ERR, h_layer the RNS layer (ignored for
// ERR), h_addr the word. A read returns h_rdata with h_rvalid one cycle
// later. Coefficient layout: word w = {x[w+2048], x[w]} for polynomials in
// coefficient form (u, c1, c0, e1, e2 and the results); NTT-domain keys use
// word w = {X[2w+1], X[2w]} with X the bit-reversed-order NTT (see he_ctrl).
// Commands (cmd_e) are taken with cmd_valid && cmd_ready; busy stays high
// for the whole run (49243 cycles for CMD_ENC_C1 + CMD_ENC_C0, 30773 for
// CMD_DEC) and done pulses once at the end. Results: c1 or c0 in INTTB after
// an encryption command, mq in INTTB after CMD_DEC.
// The published chip exchanges these words over a narrow pad interface with
// its own handshake; that serialisation is not part of this RTL, whose host
// port is this design's choice.
module he_engine
  import he_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  // commands
  input  logic          cmd_valid,
  input  cmd_e          cmd,
  output logic          cmd_ready,
  output logic          busy,
  output logic          done,
  output poly_op_e      cur_op,      // pass in progress while busy
  // host memory port
  input  logic          h_valid,
  output logic          h_ready,
  input  logic          h_we,
  input  mem_sel_e      h_mem,
  input  logic [1:0]    h_layer,
  input  waddr_t        h_addr,
  input  word_t         h_wdata,
  output logic          h_rvalid,
  output word_t         h_rdata
);
  lctrl_t   c;

  he_ctrl u_ctrl (
    .clk(clk), .rst_n(rst_n), .cmd_valid(cmd_valid), .cmd(cmd),
    .cmd_ready(cmd_ready), .busy(busy), .done(done), .c(c), .cur_op(cur_op));

  logic h_go;
  assign h_ready = !busy;
  assign h_go    = h_valid && h_ready;

  // shared error SRAM
  logic  e_host;
  word_t err_rdata;
  assign e_host = h_go && h_mem == MEM_ERR;
  sram_sp #(.DEPTH(WORDS), .WIDTH(WW)) u_err (
    .clk(clk), .en(e_host || (c.rd_en && c.add_err && c.dp_op == DP_ADD)),
    .we(e_host && h_we), .addr(e_host ? h_addr : c.rd_addr0),
    .wdata(h_wdata), .rdata(err_rdata));

  word_t l_rdata [K];
  for (genvar l = 0; l < K; l++) begin : g_layer
    he_layer #(.L(l)) u_layer (
      .clk(clk), .c(c), .err_rdata(err_rdata),
      .h_en(h_go && h_mem != MEM_ERR && h_layer == 2'(l)), .h_we(h_we),
      .h_mem(h_mem), .h_addr(h_addr), .h_wdata(h_wdata), .h_rdata(l_rdata[l]));
  end

  // host read return
  logic     rd_q;
  mem_sel_e mem_q;
  logic [1:0] layer_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q    <= 1'b0;
      mem_q   <= MEM_NTTB;
      layer_q <= '0;
    end else begin
      rd_q    <= h_go && !h_we;
      mem_q   <= h_mem;
      layer_q <= h_layer;
    end
  end
  assign h_rvalid = rd_q;
  always_comb begin
    if (mem_q == MEM_ERR)        h_rdata = err_rdata;
    else if (layer_q < 2'(K))    h_rdata = l_rdata[layer_q];
    else                         h_rdata = '0;
  end
endmodule
