// Shared constants and elaboration-time helper functions for the reconfigurable
// host-to-array interface.
//
// The general interface is built around N = 2^n array lines (the "word size" of
// the array).  The helpers below compute, at elaboration time, the quantities
// the design derives from N and from the memory word sizes:
//   * bitrev        : bit-reversed index, used by the output stager wiring
//   * line_first /
//     line_count    : the set of permutation-network lines that enter output
//                     stager module i (starts at bit-reversed i, spans
//                     N / 2^ceil(log2(i+1)) consecutive lines)
//   * waksman_bits  : number of exchange elements in the rearrangeable
//                     permutation network, N*log2(N) - N + 1
//   * gcd           : used to size the two-level buffers of the memory block,
//                     s = N_side / gcd(N_side, w_R)
// Nothing here is time-dependent; all functions are constant functions.
package ri_pkg;


  // Output-format codes shared by the parallel-to-serial converter and the
  // serial-to-parallel converters: code k means 2^k bits per clock.
  typedef logic [1:0] fmt_t;

  function automatic int unsigned clog2i(input int unsigned v);
    int unsigned r;
    r = 0;
    while ((1 << r) < v) r++;
    return r;
  endfunction

  function automatic int unsigned bitrev(input int unsigned i, input int unsigned nbits);
    int unsigned r;
    r = 0;
    for (int unsigned b = 0; b < nbits; b++) r |= ((i >> b) & 1) << (nbits - 1 - b);
    return r;
  endfunction

  function automatic int unsigned line_first(input int unsigned i, input int unsigned n);
    return bitrev(i, clog2i(n));
  endfunction

  function automatic int unsigned line_count(input int unsigned i, input int unsigned n);
    return n >> clog2i(i + 1);
  endfunction

  function automatic int unsigned waksman_bits(input int unsigned n);
    if (n <= 1) return 0;
    return n * clog2i(n) - n + 1;
  endfunction

  function automatic int unsigned gcd(input int unsigned a, input int unsigned b);
    int unsigned x, y, t;
    x = a;
    y = b;
    while (y != 0) begin
      t = x % y;
      x = y;
      y = t;
    end
    return x;
  endfunction

endpackage
