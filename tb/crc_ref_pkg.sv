// crc_ref_pkg: reference CRC for the testbenches, written as modulo-2 long
// division rather than as an LFSR or a matrix, so that it shares nothing with
// the design under test.  For a register that starts at I, a message M of
// L bits (first bit = highest power) and a generator P of degree n,
//   CRC = (I * x^L + M * x^n) mod P.
package crc_ref_pkg;

  typedef bit msg_t[$];

  function automatic logic [63:0] crc_div(int unsigned n, logic [63:0] poly,
                                          logic [63:0] init, msg_t msg);
    logic [64:0] r;
    logic [64:0] q;
    logic [64:0] full;
    full = (65'(1) << n) | 65'(poly);
    // M * x^n mod P by long division of the message followed by n zeros.
    r = '0;
    foreach (msg[i]) begin
      r = (r << 1) | 65'(msg[i]);
      if (r[n]) r = r ^ full;
    end
    for (int unsigned i = 0; i < n; i++) begin
      r = r << 1;
      if (r[n]) r = r ^ full;
    end
    // I * x^L mod P by L multiplications by x.
    q = 65'(init);
    foreach (msg[i]) begin
      q = q << 1;
      if (q[n]) q = q ^ full;
    end
    return 64'(r ^ q);
  endfunction

  // Append the low w bits of a word, bit w-1 first.
  function automatic void push_word(ref msg_t msg, input logic [1023:0] word, input int unsigned w);
    for (int i = int'(w) - 1; i >= 0; i--) msg.push_back(word[i]);
  endfunction

  // Number of input bits of a w-bit word that output bit j depends on,
  // found by feeding single-one words through the reference.
  function automatic int unsigned ref_fanin_dx(int unsigned n, logic [63:0] poly,
                                               int unsigned w, int unsigned j);
    int unsigned c = 0;
    msg_t        m;
    logic [63:0] r;
    for (int unsigned b = 0; b < w; b++) begin
      m = {};
      for (int i = int'(w) - 1; i >= 0; i--) m.push_back(i == int'(b));
      r = crc_div(n, poly, '0, m);
      c += int'(r[j]);
    end
    return c;
  endfunction

  // A random 1024-bit value; callers keep the low bits they need.
  function automatic logic [1023:0] rand_word();
    logic [1023:0] r;
    for (int i = 0; i < 32; i++) r[32*i +: 32] = $urandom;
    return r;
  endfunction

endpackage
