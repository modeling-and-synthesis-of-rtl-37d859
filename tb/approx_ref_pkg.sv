// approx_ref_pkg: arithmetic reference models for the approximate-adder
// testbenches. The models work on integers (sums, divisions, remainders),
// not on the gate structure, so they check the RTL independently.
package approx_ref_pkg;

  // AFIC adder result for operands a, b of n bits split at h, with segments
  // of seg bits in the LSB block. mode: 0 = CUB, 1 = CLB, 2 = dithered by d.
  function automatic longint unsigned afic_ref(longint unsigned a, longint unsigned b,
                                               bit d, int mode, int n, int h, int seg);
    longint unsigned res, m, msb, segsum, c, ls;
    bit ov;
    ov  = (mode == 1) || (mode == 2 && d);
    res = 0;
    m   = 64'd1 << seg;
    for (int k = 0; k < h / seg; k++) begin
      segsum = ((a >> (k * seg)) % m) + ((b >> (k * seg)) % m);
      c      = segsum / m;
      ls     = segsum % m;
      if (!ov && c == 1) ls = m - 1;
      if (ov && c == 0)  ls = 0;
      res += ls << (k * seg);
    end
    msb = (a >> h) + (b >> h) + (ov ? 1 : 0);
    res += msb << h;
    return res % (64'd1 << (n + 1));
  endfunction

  // true carry out of the low h bits
  function automatic bit lsb_carry(longint unsigned a, longint unsigned b, int h);
    longint unsigned m;
    m = 64'd1 << h;
    return ((a % m) + (b % m)) >= m;
  endfunction

endpackage
