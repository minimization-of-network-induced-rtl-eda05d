// fec_pkg: constants, types and GF(16) arithmetic shared by the FEC link.
//
// The link carries a 40-bit payload. Three channel codings exist:
//   FEC_NONE    : the 40 payload bits are sent as they are (comparison mode).
//   FEC_HAMMING : shortened SECDED Hamming code, 6 parity bits plus one
//                 overall checksum bit, 47-bit code word.
//   FEC_RS      : Reed-Solomon RS(15,11) over GF(16), primitive polynomial
//                 x^4 + x + 1, generator (x-1)(x-2)(x-4)(x-8) (roots alpha^0..alpha^3),
//                 60-bit code word. The 40-bit payload fills 10 of the 11 data
//                 symbols; the top data symbol is zero.
// Code sizes and polynomials follow the document; the encoding of the mode
// and the bit layout of the code words are this design's choice.
// The GF functions below are pure combinational functions; when they are
// called with constant operands a synthesizer folds them into small LUTs.
package fec_pkg;

  localparam int PAYLOAD_W = 40;

  // Hamming SECDED (47,40), shortened from (63,57)
  localparam int HAM_M    = 6;
  localparam int HAM_CW_W = PAYLOAD_W + HAM_M + 1;

  // Reed-Solomon RS(15,11), m = 4
  localparam int RS_M    = 4;
  localparam int RS_N    = 15;
  localparam int RS_K    = 11;
  localparam int RS_T    = 2;
  localparam int RS_NPAR = 2 * RS_T;
  localparam int RS_MSG_W = RS_M * RS_K;   // 44
  localparam int RS_CW_W  = RS_M * RS_N;   // 60

  localparam int MAX_CW_W = RS_CW_W;
  localparam int LEN_W    = 7;

  typedef enum logic [1:0] {
    FEC_NONE    = 2'd0,
    FEC_HAMMING = 2'd1,
    FEC_RS      = 2'd2
  } fec_mode_e;

  typedef logic [RS_M-1:0] gf_t;

  // Frame length on the line (code word bits) for each mode.
  function automatic logic [LEN_W-1:0] frame_len(fec_mode_e mode);
    case (mode)
      FEC_HAMMING: return LEN_W'(HAM_CW_W);
      FEC_RS:      return LEN_W'(RS_CW_W);
      default:     return LEN_W'(PAYLOAD_W);
    endcase
  endfunction

  // GF(16) multiply modulo x^4 + x + 1.
  function automatic gf_t gf_mul(gf_t a, gf_t b);
    logic [6:0] p;
    p = '0;
    for (int i = 0; i < 4; i++)
      if (b[i]) p = p ^ (7'(a) << i);
    for (int i = 6; i >= 4; i--)
      if (p[i]) p = p ^ (7'b0010011 << (i - 4));
    return p[3:0];
  endfunction

  // GF(16) multiplicative inverse (0 maps to 0).
  function automatic gf_t gf_inv(gf_t a);
    gf_t r;
    r = '0;
    for (int b = 1; b < 16; b++)
      if (gf_mul(a, gf_t'(b)) == 4'd1) r = gf_t'(b);
    return r;
  endfunction

  // alpha^e with alpha = x (= 4'h2).
  function automatic gf_t gf_alpha_pow(int unsigned e);
    gf_t r;
    r = 4'd1;
    for (int i = 0; i < 15; i++)
      if (i < int'(e % 15)) r = gf_mul(r, 4'd2);
    return r;
  endfunction

  // Coefficient i (x^i) of g(x) = (x+1)(x+a)(x+a^2)(x+a^3); coefficient 4 is 1.
  function automatic gf_t rs_gen_coef(int i);
    gf_t g [5];
    gf_t root;
    g[0] = 4'd1;
    for (int k = 1; k < 5; k++) g[k] = '0;
    for (int j = 0; j < RS_NPAR; j++) begin
      root = gf_alpha_pow(j);
      for (int k = 4; k >= 1; k--) g[k] = g[k-1] ^ gf_mul(g[k], root);
      g[0] = gf_mul(g[0], root);
    end
    return g[i];
  endfunction

  // Hamming code word position (1..46) of payload bit j (0..39):
  // the j-th position that is not a power of two.
  function automatic int ham_data_pos(int j);
    int cnt;
    int pos;
    cnt = 0;
    pos = 0;
    for (int p = 1; p <= HAM_CW_W - 1; p++) begin
      if ((p & (p - 1)) != 0) begin
        if (cnt == j) pos = p;
        cnt++;
      end
    end
    return pos;
  endfunction

endpackage
