// Shared constants and types of the BFV client engine.
//
// The engine works on degree-4096 polynomials whose 109-bit modulus is split
// into three RNS primes of 36, 36 and 37 bits; every coefficient is carried in a
// 40-bit datapath word and two coefficients share one 80-bit memory word.
// The ring size, word widths and the 36/36/37-bit prime sizes follow the
// published parameter set. The prime values themselves, their primitive
// 2N-th roots of unity and the operation encodings are this design's choice:
// each prime is q = k*8192 + 1 so that a negacyclic NTT of length 4096 exists.
package he_pkg;

  localparam int unsigned N      = 4096;         // polynomial degree
  localparam int unsigned LOGN   = 12;
  localparam int unsigned K      = 3;            // RNS primes = layers
  localparam int unsigned W      = 40;           // coefficient width
  localparam int unsigned WW     = 2 * W;        // memory word width
  localparam int unsigned WORDS  = N / 2;        // 80-bit words per polynomial
  localparam int unsigned AW     = $clog2(WORDS); // 11-bit word address

  typedef logic [W-1:0]  coef_t;
  typedef logic [WW-1:0] word_t;
  typedef logic [AW-1:0] waddr_t;

  // RNS primes (q = 1 mod 2N), primitive 2N-th roots psi and bit lengths
  localparam logic [W-1:0] Q_TAB   [K] = '{40'h0ffffee001, 40'h0ffffc4001, 40'h1ffffe0001};
  localparam logic [W-1:0] PSI_TAB [K] = '{40'd5546991020, 40'd41019061109, 40'd61409057737};
  localparam int unsigned  QB_TAB  [K] = '{36, 36, 37};

  // Datapath operation select
  typedef enum logic [1:0] {
    DP_CT  = 2'd0,   // Cooley-Tukey butterfly (forward NTT)
    DP_GS  = 2'd1,   // Gentleman-Sande butterfly (inverse NTT)
    DP_MUL = 2'd2,   // coefficient-wise modular product
    DP_ADD = 2'd3    // coefficient-wise modular sum
  } dp_op_e;

  // Polynomial operation run by the controller over all layers
  typedef enum logic [2:0] {
    PO_NTT   = 3'd0,  // 12 CT stages, in place
    PO_INTT  = 3'd1,  // 12 GS stages, in place
    PO_SCALE = 3'd2,  // multiply by N^-1 (second half of an INTT)
    PO_MUL   = 3'd3,  // dyadic product with the key SRAM
    PO_ADD   = 3'd4   // coefficient-wise addition
  } poly_op_e;

  // On-chip memories addressable by the host and by the controller
  typedef enum logic [1:0] {
    MEM_NTTB  = 2'd0,  // NTT buffer
    MEM_INTTB = 2'd1,  // INTT buffer
    MEM_KEY   = 2'd2,  // public key (or secret key for decryption)
    MEM_ERR   = 2'd3   // error polynomial (shared by all layers)
  } mem_sel_e;

  // Commands
  typedef enum logic [1:0] {
    CMD_ENC_C1 = 2'd0,  // U = NTT(u); c1 = INTT(U.P1) + e2
    CMD_ENC_C0 = 2'd1,  // c0 = INTT(U.P0) + e1 (reuses U)
    CMD_DEC    = 2'd2   // mq = INTT(s.NTT(c1)) + c0
  } cmd_e;

  // Write-back latency after the read of an operation's operands, in cycles
  localparam int unsigned LAT_BF  = 15;  // SRAM read + 13 datapath regs + swap reg
  localparam int unsigned LAT_MUL = 11;  // SRAM read + 10 multiplier regs
  localparam int unsigned LAT_ADD = 1;   // SRAM read, adder is combinational

  // N^-1 mod q of each prime, the scaling constant of the inverse NTT
  function automatic logic [W-1:0] ninv(int unsigned l);
    logic [2*W-1:0] t;
    logic [W-1:0] r;
    // N^-1 = q - (q - 1) / N, since N divides q - 1
    t = (2*W)'(Q_TAB[l] - 1) / (2*W)'(N);
    r = Q_TAB[l] - W'(t);
    return r;
  endfunction

  // Barrett constant mu = floor(2^(2*QB) / q)
  function automatic logic [W:0] barrett_mu(int unsigned l);
    logic [2*W+1:0] one;
    one = (2*W+2)'(1) << (2 * QB_TAB[l]);
    return (W+1)'(one / (2*W+2)'(Q_TAB[l]));
  endfunction

  // Control word broadcast by the controller to all layers each cycle.
  // Read side: operands fetched this cycle. Write side: results stored this
  // cycle, which belong to the read made LAT_* cycles earlier.
  typedef struct packed {
    logic             rd_en;     // fetch operands
    logic             rd_pair;   // butterfly: fetch word pair rd_addr0/rd_addr1
    waddr_t           rd_addr0;
    waddr_t           rd_addr1;
    mem_sel_e         src;       // buffer holding operand A (NTTB or INTTB)
    logic             add_err;   // PO_ADD: B from the error SRAM, else from INTTB
    logic             key_rd;    // PO_MUL: multiplicand from the key SRAM
    logic [LOGN-1:0]  tw_addr0;  // twiddle ROM addresses of datapath 0 / 1
    logic [LOGN-1:0]  tw_addr1;
    logic             scale;     // multiplicand is N^-1
    dp_op_e           dp_op;     // datapath operation, constant during an op
    logic             wr_en;     // store results
    logic             wr_pair;   // butterfly: store word pair wr_addr0/wr_addr1
    logic             wr_swap;   // butterfly: exchange coefficients across the pair
    waddr_t           wr_addr0;
    waddr_t           wr_addr1;
    mem_sel_e         dst;       // destination buffer (NTTB or INTTB)
  } lctrl_t;

endpackage
