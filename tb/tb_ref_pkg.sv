// tb_ref_pkg: reference models for the testbenches, written independently
// of the design: GF(16) arithmetic through log/antilog tables, RS(15,11)
// encoding by polynomial long division, the scrambler as a bit-serial
// recursion, and the Hamming syndrome from the position numbers.
package tb_ref_pkg;

  typedef logic [3:0] sym_t;

  // antilog table: alpha^i, alpha = x, x^4 = x + 1
  function automatic sym_t alog(int i);
    sym_t a;
    a = 4'd1;
    for (int k = 0; k < (i % 15 + 15) % 15; k++)
      a = {a[2:0], 1'b0} ^ (a[3] ? 4'b0011 : 4'b0000);
    return a;
  endfunction

  function automatic int glog(sym_t a);
    int r;
    r = 0;
    for (int i = 0; i < 15; i++) if (alog(i) == a) r = i;
    return r;
  endfunction

  function automatic sym_t mul(sym_t a, sym_t b);
    if (a == 0 || b == 0) return 4'd0;
    return alog(glog(a) + glog(b));
  endfunction

  function automatic sym_t inv(sym_t a);
    return alog(15 - glog(a));
  endfunction

  // RS(15,11) code word from 44-bit message (coefficient x^i at bits 4i+3:4i)
  function automatic logic [59:0] rs_encode(logic [43:0] msg);
    sym_t g [5];
    sym_t r [15];
    sym_t q;
    logic [59:0] cw;
    g[0] = 4'd1; for (int k = 1; k < 5; k++) g[k] = 0;
    for (int j = 0; j < 4; j++)
      for (int k = 4; k >= 0; k--)
        g[k] = (k > 0 ? g[k-1] : 4'd0) ^ mul(g[k], alog(j));
    for (int i = 0; i < 15; i++) r[i] = (i >= 4) ? msg[4*(i-4) +: 4] : 4'd0;
    for (int i = 14; i >= 4; i--) begin
      q = r[i];
      for (int k = 0; k <= 4; k++) r[i-4+k] = r[i-4+k] ^ mul(q, g[k]);
    end
    cw = {msg, 16'd0};
    for (int i = 0; i < 4; i++) cw[4*i +: 4] = r[i];
    return cw;
  endfunction

  function automatic sym_t rs_eval(logic [59:0] cw, int j);
    sym_t acc;
    acc = 0;
    for (int i = 0; i < 15; i++) acc = acc ^ mul(cw[4*i +: 4], alog(i * j));
    return acc;
  endfunction

  // serial scrambler reference, polynomial 1 + x^39 + x^58
  function automatic logic [39:0] scramble(logic [39:0] d, ref logic [57:0] hist);
    logic [39:0] s;
    for (int i = 0; i < 40; i++) begin
      s[i] = d[i] ^ hist[38] ^ hist[57];
      hist = {hist[56:0], s[i]};
    end
    return s;
  endfunction

  // Hamming SECDED (47,40) reference: position p (1..46) at bit p, payload on
  // the positions that are not powers of two, overall even parity at bit 0
  function automatic logic [46:0] ham_encode(logic [39:0] d);
    logic [46:0] w;
    int j;
    logic [5:0] syn;
    w = '0; j = 0;
    for (int p = 1; p < 47; p++)
      if ((p & (p - 1)) != 0) begin w[p] = d[j]; j++; end
    syn = 0;
    for (int p = 1; p < 47; p++) if (w[p]) syn ^= 6'(p);
    for (int k = 0; k < 6; k++) w[1 << k] = syn[k];
    w[0] = ^w[46:1];
    return w;
  endfunction

  function automatic logic [39:0] ham_data(logic [46:0] w);
    logic [39:0] d;
    int j;
    j = 0;
    for (int p = 1; p < 47; p++)
      if ((p & (p - 1)) != 0) begin d[j] = w[p]; j++; end
    return d;
  endfunction

  // code word and frame length for a mode (0 none, 1 Hamming, 2 RS) from a
  // scrambled payload
  function automatic logic [59:0] encode_mode(int mode, logic [39:0] s);
    case (mode)
      1:       return 60'(ham_encode(s));
      2:       return rs_encode({4'd0, s});
      default: return 60'(s);
    endcase
  endfunction

  function automatic int len_mode(int mode);
    return (mode == 1) ? 47 : (mode == 2) ? 60 : 40;
  endfunction

  // serial descrambler reference
  function automatic logic [39:0] descramble(logic [39:0] s, ref logic [57:0] hist);
    logic [39:0] d;
    for (int i = 0; i < 40; i++) begin
      d[i] = s[i] ^ hist[38] ^ hist[57];
      hist = {hist[56:0], s[i]};
    end
    return d;
  endfunction

  // scrambled payload carried by an error-free code word
  function automatic logic [39:0] payload_of(int mode, logic [59:0] cw);
    case (mode)
      1:       return ham_data(cw[46:0]);
      2:       return cw[55:16];
      default: return cw[39:0];
    endcase
  endfunction

endpackage
