// bch_ref_pkg: reference model for the testbenches of the (15,k) encoders.
//
// A codeword is computed by plain polynomial long division, written
// independently of the shift-register circuit: the k information bits
// (bit k-1 = highest degree = first bit sent) are multiplied by x^(n-k),
// divided by g(x), and the remainder is appended as the n-k low-order bits:
//     c(x) = x^(n-k) i(x) + (x^(n-k) i(x) mod g(x)).
// Bit 14 of the returned codeword is the first bit on the line.
package bch_ref_pkg;

  function automatic logic [14:0] ref_codeword(input logic [14:0] info,
                                               input int unsigned k,
                                               input logic [10:0] g);
    int unsigned r = 15 - k;
    logic [14:0] v;
    logic [14:0] msg;
    msg = info & ((15'd1 << k) - 15'd1);
    v   = msg << r;
    for (int d = 14; d >= int'(r); d--)
      if (v[d]) v ^= 15'(g) << (d - int'(r));
    return (msg << r) | v;
  endfunction

  // Remainder of a full 15-bit word divided by g(x); zero for every codeword.
  function automatic logic [10:0] ref_syndrome(input logic [14:0] word,
                                               input int unsigned k,
                                               input logic [10:0] g);
    int unsigned r = 15 - k;
    logic [14:0] v = word;
    for (int d = 14; d >= int'(r); d--)
      if (v[d]) v ^= 15'(g) << (d - int'(r));
    return 11'(v);
  endfunction

endpackage
