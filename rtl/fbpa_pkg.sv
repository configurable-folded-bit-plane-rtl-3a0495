// fbpa_pkg: constants and elaboration-time functions shared by the folded
// bit-plane FIR filter.
//
// The filter computes every output y as one chain of L = k*N "operations";
// operation p adds the partial product 2^j * c^j * x (one coefficient bit
// times one input word) to the running sum. Folding maps operation p onto
// hardware section s = p mod k and time slot r = p mod N. Because a section
// can do only one operation per cycle, the pair (s, r) must identify p
// uniquely, which holds when gcd(k, N) = 1 (Chinese remainder theorem).
//
// op_index(s, r) inverts that mapping; mc_supported(mc) tells whether a
// coefficient length mc can be run by this array with one input word per
// N cycles (see fbpa_fir for the derivation). All functions are evaluated at
// elaboration only. The default sizes are those of the worked example:
// k = 3 sections, folding factor N = 4. The input word width of 8 bits is
// this design's choice.
package fbpa_pkg;

  localparam int unsigned DEF_K  = 3;   // number of sections / folding sets
  localparam int unsigned DEF_N  = 4;   // folding factor
  localparam int unsigned DEF_DW = 8;   // input word width n (own choice)

  function automatic int unsigned gcd(int unsigned a, int unsigned b);
    int unsigned t;
    while (b != 0) begin
      t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  // Operation executed by section s in slot r: p with p mod k == s and
  // p mod n == r, 0 <= p < k*n.
  function automatic int unsigned op_index(int unsigned s, int unsigned r,
                                           int unsigned k, int unsigned n);
    for (int unsigned p = 0; p < k * n; p++)
      if ((p % k) == s && (p % n) == r) return p;
    return 0;
  endfunction

  // A coefficient length mc is supported when
  //   - mc divides L = k*n (kc = L/mc coefficients fill the array exactly),
  //   - mc is a multiple of k, so every coefficient starts in section S_0,
  //     where the input switch can hand the chain its next input word, and
  //   - the input word present when coefficient i starts is the one it
  //     needs: floor(i*mc/n) == i for i = 0 .. kc-1.
  function automatic bit mc_supported(int unsigned mc, int unsigned k,
                                      int unsigned n);
    int unsigned l, kc;
    l = k * n;
    if (mc == 0 || mc > l) return 1'b0;
    if ((l % mc) != 0) return 1'b0;
    if ((mc % k) != 0) return 1'b0;
    kc = l / mc;
    for (int unsigned i = 0; i < kc; i++)
      if (((i * mc) / n) != i) return 1'b0;
    return 1'b1;
  endfunction

endpackage
