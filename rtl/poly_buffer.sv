// Polynomial buffer: 2048 words x 80 bits (4096 coefficients) built from two
// 1024 x 80 dual-port SRAM banks, with two read ports and two write ports.
//
// Word address w (11 bits) lives in bank ^w (parity of all address bits) at
// bank address w[10:1]. Two words whose addresses differ in exactly one bit
// always sit in different banks. The in-place NTT schedule reads such a pair
// each cycle and writes back such a pair each cycle, so each bank sees at most
// one read and one write per cycle. Linear passes use port 0 only. The two
// banks per buffer follow the published memory list; the parity interleaving
// is this design's choice.
//
// Timing: read data one cycle after re/raddr. Two enabled ports of the same
// direction must address different banks (checked by assertions).
module poly_buffer
  import he_pkg::*;
(
  input  logic   clk,
  input  logic   re    [2],
  input  waddr_t raddr [2],
  output word_t  rdata [2],
  input  logic   we    [2],
  input  waddr_t waddr [2],
  input  word_t  wdata [2]
);
  localparam int unsigned BD = WORDS / 2;   // words per bank

  logic rbank [2];
  logic wbank [2];
  logic rbank_q [2];
  always_comb
    for (int i = 0; i < 2; i++) begin
      rbank[i] = ^raddr[i];
      wbank[i] = ^waddr[i];
    end

  logic                   b_re    [2];
  logic [$clog2(BD)-1:0]  b_raddr [2];
  word_t                  b_rdata [2];
  logic                   b_we    [2];
  logic [$clog2(BD)-1:0]  b_waddr [2];
  word_t                  b_wdata [2];

  always_comb
    for (int k = 0; k < 2; k++) begin
      if (re[0] && rbank[0] == k[0]) begin
        b_re[k] = 1'b1; b_raddr[k] = raddr[0][AW-1:1];
      end else begin
        b_re[k] = re[1] && rbank[1] == k[0]; b_raddr[k] = raddr[1][AW-1:1];
      end
      if (we[0] && wbank[0] == k[0]) begin
        b_we[k] = 1'b1; b_waddr[k] = waddr[0][AW-1:1]; b_wdata[k] = wdata[0];
      end else begin
        b_we[k] = we[1] && wbank[1] == k[0]; b_waddr[k] = waddr[1][AW-1:1];
        b_wdata[k] = wdata[1];
      end
    end

  for (genvar k = 0; k < 2; k++) begin : g_bank
    sram_dp #(.DEPTH(BD), .WIDTH(WW)) u_sram (
      .clk(clk), .re(b_re[k]), .raddr(b_raddr[k]), .rdata(b_rdata[k]),
      .we(b_we[k]), .waddr(b_waddr[k]), .wdata(b_wdata[k]));
  end

  always_ff @(posedge clk) begin
    rbank_q[0] <= rbank[0];
    rbank_q[1] <= rbank[1];
  end
  assign rdata[0] = b_rdata[rbank_q[0]];
  assign rdata[1] = b_rdata[rbank_q[1]];

  // each bank serves one read and one write per cycle
  a_read_conflict:  assert property (@(posedge clk) (re[0] && re[1]) |-> rbank[0] != rbank[1]);
  a_write_conflict: assert property (@(posedge clk) (we[0] && we[1]) |-> wbank[0] != wbank[1]);
endmodule
