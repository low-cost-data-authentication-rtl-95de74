// dh_ref_pkg: reference model of the hiding scheme for the testbenches,
// written from the scheme's rules rather than from the RTL.
//   ext_bit(p, k)   bit k (0..15) of the extended string of message pixel p:
//                   p[3] for k = 0..8, p[2] for k = 9..13, p[1], p[0].
//   embed(c, s, b)  cover pixel c with bit plane s replaced by b.
//   decide(bits)    receiver decision on a 16-bit extracted string: majority
//                   of bits 0..8, majority of bits 9..13, bit 14, bit 15.
package dh_ref_pkg;

  function automatic bit ext_bit(input logic [3:0] p, input int k);
    if (k < 9)   return p[3];
    if (k < 14)  return p[2];
    if (k == 14) return p[1];
    return p[0];
  endfunction

  function automatic logic [7:0] embed(input logic [7:0] c, input int s, input bit b);
    logic [7:0] r;
    r = c;
    r[s] = b;
    return r;
  endfunction

  function automatic logic [3:0] decide(input logic [15:0] bits);
    int hi, mid;
    hi = 0; mid = 0;
    for (int k = 0; k < 9; k++)   hi  += int'(bits[k]);
    for (int k = 9; k < 14; k++)  mid += int'(bits[k]);
    return {hi > 4, mid > 2, bits[14], bits[15]};
  endfunction

  // a simple integer hash used to make test images and noise repeatable
  function automatic int unsigned mix(input int unsigned x);
    x = x ^ (x >> 16);
    x = x * 32'h7feb352d;
    x = x ^ (x >> 15);
    x = x * 32'h846ca68b;
    x = x ^ (x >> 16);
    return x;
  endfunction

endpackage
