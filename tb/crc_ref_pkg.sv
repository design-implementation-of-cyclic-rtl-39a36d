// crc_ref_pkg: reference CRC arithmetic for the testbenches, written
// independently of the RTL's unrolled long division.
//
// Vectors are at most 64 bits, coefficient of x^i in bit i. Both functions
// run a plain one-bit-per-step shift-register division:
//   ref_crc(m, mw, g, k)  = m(x)*x^k mod g(x)   (encoder check bits)
//   ref_mod(v, vw, g, k)  = v(x) mod g(x)       (checker remainder)
// g is the full degree-k polynomial (bit k set).
package crc_ref_pkg;

  function automatic logic [63:0] low_mask(int k);
    return (k >= 64) ? '1 : ((64'd1 << k) - 64'd1);
  endfunction

  // Message bits enter at the top of the register: no zeros need appending.
  function automatic logic [63:0] ref_crc(logic [63:0] m, int mw, logic [63:0] g, int k);
    logic [63:0] r = '0;
    logic        fb;
    for (int i = mw - 1; i >= 0; i--) begin
      fb = r[k-1] ^ m[i];
      r  = (r << 1) & low_mask(k);
      if (fb) r = r ^ (g & low_mask(k));
    end
    return r;
  endfunction

  // Bits enter at the bottom; the bit shifted out of the top decides the XOR.
  function automatic logic [63:0] ref_mod(logic [63:0] v, int vw, logic [63:0] g, int k);
    logic [63:0] r = '0;
    logic        top;
    for (int i = vw - 1; i >= 0; i--) begin
      top = r[k-1];
      r   = ((r << 1) | 64'(v[i])) & low_mask(k);
      if (top) r = r ^ (g & low_mask(k));
    end
    return r;
  endfunction

  // A random proper generator polynomial of degree k (x^k and x^0 terms set).
  function automatic logic [63:0] rand_poly(int k);
    logic [63:0] g = {$urandom, $urandom};
    g = g & low_mask(k + 1);
    g[k] = 1'b1;
    g[0] = 1'b1;
    return g;
  endfunction

endpackage
