// saet_ref_pkg: reference models used by the testbenches.
//
// The models are written from the arithmetic, not from the gate structure:
// an approximate full adder is a full adder whose sum bit flips whenever its
// three inputs are equal, and its carry is exact. So the approximate low
// part of the SAET-CSLA equals the exact low sum with those bits flipped,
// where the carry into bit i is found from the exact sum of the bits below.
package saet_ref_pkg;

  // Exact carry into bit i of a + b + cin
  function automatic bit carry_into(int unsigned a, int unsigned b, bit cin, int i);
    int unsigned m;
    m = (1 << i) - 1;
    return bit'((((a & m) + (b & m) + cin) >> i) & 1);
  endfunction

  // N-bit ripple chain of approximate full adders: {cout, sum}
  function automatic int unsigned approx_chain(int unsigned a, int unsigned b, bit cin, int n);
    int unsigned exact, flip;
    bit ai, bi, ci;
    exact = (a & ((1 << n) - 1)) + (b & ((1 << n) - 1)) + cin;
    flip  = 0;
    for (int i = 0; i < n; i++) begin
      ai = bit'((a >> i) & 1);
      bi = bit'((b >> i) & 1);
      ci = carry_into(a, b, cin, i);
      if (ai == bi && bi == ci) flip |= (1 << i);
    end
    return exact ^ flip;   // the carry out (bit n) is never flipped
  endfunction

  // SAET-CSLA of width w with acc accurate upper bits: {cout, sum}
  function automatic int unsigned saet_add(int unsigned a, int unsigned b, int w = 8, int acc = 4);
    int lo;
    int unsigned exact, lowpart;
    lo      = w - acc;
    exact   = a + b;
    lowpart = approx_chain(a, b, 1'b0, lo) & ((1 << lo) - 1);
    return (exact & ~((1 << lo) - 1)) | lowpart;
  endfunction

  // Pixel weighted by w / 256, w limited to 256, truncated
  function automatic int unsigned scale(int unsigned pix, int unsigned w);
    if (w > 256) w = 256;
    return (pix * w) / 256;
  endfunction

  // One blended pixel through the approximate adder
  function automatic int unsigned blend(int unsigned f1, int unsigned f2, int unsigned alpha);
    int unsigned a;
    a = (alpha > 256) ? 256 : alpha;
    return saet_add(scale(f1, 256 - a), scale(f2, a)) & 8'hff;
  endfunction

  // The same pixel with exact addition
  function automatic int unsigned blend_exact(int unsigned f1, int unsigned f2, int unsigned alpha);
    int unsigned a;
    a = (alpha > 256) ? 256 : alpha;
    return scale(f1, 256 - a) + scale(f2, a);
  endfunction

endpackage
