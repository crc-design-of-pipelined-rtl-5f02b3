// crc_pkg: shared types and elaboration-time functions of the pipelined
// parallel CRC.
//
// A CRC register of degree n updated with w input bits per clock is a linear
// map over GF(2):  C' = F^w * C  xor  M * Din.  F is the n x n companion
// matrix of the generator polynomial (an MSB-first Galois LFSR: c'_i =
// c_(i-1) xor p_i*c_(n-1), with the input bit xored into the feedback), and
// the data matrix M is what the input bits contribute when the register
// starts from zero.  Everything here is evaluated while the design is
// elaborated: the matrices, the number of inputs each output depends on (N of
// the logic-level estimate L = ceil(log2 N)), and the pipeline register sizes
//   S(j,K-1) = popcount(row j of M)
//   S(j,i)   = ceil(S(j,i+1) / 2^DL(i+1))      for i < K-1
//   RS(i)    = sum_j S(j,i)
// where K is the number of DX sub-logics and DL(i) the logic level chosen for
// sub-logic i.  These formulas are the partitioning method of the design; the
// max-size limits (MAX_N, MAX_W, MAX_K) and the struct carried beside the
// data are this implementation's own.
package crc_pkg;

  localparam int unsigned MAX_N = 64;    // largest CRC degree supported
  localparam int unsigned MAX_W = 1024;  // largest input width supported
  localparam int unsigned MAX_K = 8;     // largest number of DX sub-logics

  typedef logic [MAX_N-1:0]            crc_word_t;  // polynomial / CRC value, bit i = coefficient of x^i
  typedef logic [MAX_K-1:0][3:0]       dl_t;        // dl[i] = logic level of DX Sub-Logic(i)
  typedef logic [MAX_N-1:0][MAX_N-1:0] cx_mat_t;    // [j] = row j of F^w (mask over CRC bits)
  typedef logic [MAX_N-1:0][15:0]      cnt_t;       // [j] = number of ones in row j of M

  // Control carried through the pipeline alongside the data.
  typedef struct packed {
    logic valid;  // this word is to be folded into the CRC
    logic sop;    // first word of a message: start from the initial value
    logic eop;    // last word of a message: the CRC is final after it
  } crc_ctl_t;

  // One serial LFSR step, data bit xored into the feedback from c_(n-1).
  function automatic crc_word_t lfsr_step(int unsigned n, crc_word_t poly,
                                          crc_word_t s, logic din);
    logic      fb;
    crc_word_t mask;
    mask = (n >= MAX_N) ? '1 : ((crc_word_t'(1) << n) - crc_word_t'(1));
    fb   = s[n-1] ^ din;
    s    = (s << 1) & mask;
    if (fb) s = s ^ (poly & mask);
    return s;
  endfunction

  // Rows of F^w: cx[j][k] = 1 when CRC bit k feeds output bit j of CX.
  function automatic cx_mat_t cx_matrix(int unsigned n, crc_word_t poly, int unsigned w);
    cx_mat_t   m;
    crc_word_t col;
    m = '0;
    for (int unsigned k = 0; k < n; k++) begin
      col = crc_word_t'(1) << k;
      for (int unsigned b = 0; b < w; b++) col = lfsr_step(n, poly, col, 1'b0);
      for (int unsigned j = 0; j < n; j++) m[j][k] = col[j];
    end
    return m;
  endfunction

  // The data matrix M is never stored whole: its column for input bit b is
  // F^b * p (input bit w-1 is the first bit of the word in serial order), so
  // the functions below walk the columns with one LFSR step per bit.

  // cnt[j] = number of input bits d_j depends on (S(j,K-1)).
  function automatic cnt_t dx_counts(int unsigned n, crc_word_t poly, int unsigned w);
    cnt_t      c;
    crc_word_t col;
    for (int unsigned j = 0; j < MAX_N; j++) c[j] = '0;
    col = lfsr_step(n, poly, '0, 1'b1);
    for (int unsigned b = 0; b < w; b++) begin
      for (int unsigned j = 0; j < n; j++) if (col[j]) c[j] = c[j] + 16'd1;
      col = lfsr_step(n, poly, col, 1'b0);
    end
    return c;
  endfunction

  // Index of the q-th input bit (counting from bit 0 up) that d_j depends on.
  function automatic int unsigned dx_src(int unsigned n, crc_word_t poly, int unsigned w,
                                         int unsigned j, int unsigned q);
    crc_word_t   col;
    int unsigned c = 0;
    col = lfsr_step(n, poly, '0, 1'b1);
    for (int unsigned b = 0; b < w; b++) begin
      if (col[j]) begin
        if (c == q) return b;
        c++;
      end
      col = lfsr_step(n, poly, col, 1'b0);
    end
    return 0;
  endfunction

  // F^w applied to a constant CRC value.
  function automatic crc_word_t cx_apply(int unsigned n, crc_word_t poly,
                                         int unsigned w, crc_word_t c);
    for (int unsigned b = 0; b < w; b++) c = lfsr_step(n, poly, c, 1'b0);
    return c;
  endfunction

  function automatic int unsigned popcount_n(crc_word_t v);
    int unsigned c = 0;
    for (int unsigned i = 0; i < MAX_N; i++) c += int'(v[i]);
    return c;
  endfunction

  // Logic level of a balanced 2-input XOR tree over n_in inputs: ceil(log2 n_in).
  function automatic int unsigned logic_level(int unsigned n_in);
    int unsigned l = 0;
    while ((1 << l) < n_in) l++;
    return l;
  endfunction

  // N of CX and DX: largest number of inputs any output bit depends on.
  function automatic int unsigned cx_fanin(int unsigned n, crc_word_t poly, int unsigned w);
    cx_mat_t     m;
    int unsigned mx = 0;
    m = cx_matrix(n, poly, w);
    for (int unsigned j = 0; j < n; j++)
      if (popcount_n(m[j]) > mx) mx = popcount_n(m[j]);
    return mx;
  endfunction

  function automatic int unsigned dx_fanin(int unsigned n, crc_word_t poly, int unsigned w);
    cnt_t        c;
    int unsigned mx = 0;
    c = dx_counts(n, poly, w);
    for (int unsigned j = 0; j < n; j++)
      if (int'(c[j]) > mx) mx = int'(c[j]);
    return mx;
  endfunction

  // Logic-level partitioning: the number of DX sub-logics K and the level
  // DL(i) of each.  With L_CX and L_DX the levels of CX and of the whole DX,
  // Sub-Logic(0) must stay below L_CX (it feeds the XOR Array, as CX does)
  // and every other sub-logic below L_CX + 1, so that the clock is set by
  // the CX loop.  K is the smallest count whose levels reach L_DX:
  //   K = 1                                  if L_DX <= L_CX - 1
  //   K = 1 + ceil((L_DX - (L_CX - 1)) / L_CX) otherwise
  // DL(0) = L_CX - 1 and the remaining L_DX - DL(0) levels are spread as
  // evenly as possible over Sub-Logic(K-1)..(1), the extra level going to
  // the stages nearest the input.  For CRC16-A at w = 32 (L_CX = 4,
  // L_DX = 5) this gives K = 2, DL(1) = 2, DL(0) = 3.
  function automatic int unsigned auto_k(int unsigned n, crc_word_t poly, int unsigned w);
    int unsigned lcx, ldx, m0, m, k;
    lcx = logic_level(cx_fanin(n, poly, w));
    ldx = logic_level(dx_fanin(n, poly, w));
    m   = (lcx > 1) ? lcx : 1;
    m0  = (lcx > 1) ? lcx - 1 : 1;
    if (ldx <= m0) return 1;
    k = 1 + (ldx - m0 + m - 1) / m;
    return (k > MAX_K) ? MAX_K : k;
  endfunction

  function automatic dl_t auto_dl(int unsigned n, crc_word_t poly, int unsigned w);
    int unsigned lcx, ldx, m0, k, r, q, e;
    dl_t         dl;
    dl  = '0;
    lcx = logic_level(cx_fanin(n, poly, w));
    ldx = logic_level(dx_fanin(n, poly, w));
    k   = auto_k(n, poly, w);
    m0  = (lcx > 1) ? lcx - 1 : 1;
    if (k == 1) begin
      dl[0] = 4'(ldx);
      return dl;
    end
    dl[0] = 4'(m0);
    r = ldx - m0;
    q = r / (k - 1);
    e = r % (k - 1);
    for (int unsigned i = 1; i < k; i++)
      dl[i] = 4'(q + (((k - 1 - i) < e) ? 1 : 0));
    return dl;
  endfunction

  // Table of S(j,i), equation (6): sz[i+1][j] is the number of inputs of
  // DX Sub-Logic(i) that affect d_j.  Entry i = -1 (sz[0]) stands for the
  // output of Sub-Logic(0): one bit, or none when d_j does not depend on the
  // data.
  typedef logic [MAX_K:0][MAX_N-1:0][15:0] sz_t;

  function automatic sz_t size_table(int unsigned n, crc_word_t poly, int unsigned w,
                                     int unsigned k, dl_t dl);
    sz_t         t;
    cnt_t        c;
    int unsigned s;
    for (int unsigned i = 0; i <= MAX_K; i++) t[i] = '0;
    c = dx_counts(n, poly, w);
    for (int unsigned j = 0; j < n; j++) begin
      s = int'(c[j]);
      t[0][j] = 16'((s > 0) ? 1 : 0);
      for (int st = int'(k) - 1; st >= 0; st--) begin
        t[st+1][j] = 16'(s);
        s = (s + (1 << dl[st]) - 1) >> dl[st];
      end
    end
    return t;
  endfunction

  // Offset of output j's group in the flat register of stage i (sum of
  // S(j',i) over j' < j); with j = n it is RS(i) of equation (7).
  function automatic int unsigned s_offset(sz_t t, int unsigned j, int i);
    int unsigned o = 0;
    for (int unsigned jj = 0; jj < j; jj++) o += int'(t[i+1][jj]);
    return o;
  endfunction

endpackage
