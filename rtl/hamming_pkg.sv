// hamming_pkg: shared functions for the single-error-correcting,
// double-error-detecting (SEC-DED) Hamming code used to protect an FSM state.
//
// Bits of a Hamming code word are numbered from position 1. Positions that are
// powers of two (1, 2, 4, 8, ...) hold parity bits p0, p1, p2, ...; the other
// positions (3, 5, 6, 7, 9, ...) hold the data bits d0, d1, d2, ... in order.
// Parity bit pk covers every data bit whose position has bit k set, and is
// chosen so that its group has even parity. When the stored parity bits are
// XORed with parity recomputed from the stored data, the result (the syndrome)
// is the position of a single flipped bit. An extra overall parity bit, even
// over the whole word, separates single errors (odd) from double errors (even).
//
// Instead of fixed lookup tables, the group membership of each data bit and the
// correction mask for each syndrome are computed from the position numbering,
// so any data width from 1 to MAX_DATA bits works. MAX_DATA = 120 is the
// largest width that 7 parity bits can cover (120 <= 2^7 - 1 - 7).
package hamming_pkg;

  localparam int MAX_DATA = 120;  // largest supported number of data bits
  localparam int MAX_PAR  = 7;    // parity bits needed for MAX_DATA

  typedef logic [MAX_DATA-1:0] data_t;  // data word, bit i = d_i
  typedef logic [MAX_PAR-1:0]  synd_t;  // parity/syndrome, bit k = p_k

  // Smallest number of parity bits p with d <= 2^p - 1 - p.
  function automatic int num_parity(input int d);
    int p = 1;
    while (d > (1 << p) - 1 - p) p++;
    return p;
  endfunction

  // Code-word position (1-based) of data bit i: the (i+1)-th position that is
  // not a power of two. A data bit preceded by p parity bits sits at position
  // i + 1 + p, and that position lies between 2^(p-1) and 2^p; the first p
  // with i + 1 + p < 2^p is the right one.
  function automatic int data_position(input int i);
    for (int p = 2; p <= MAX_PAR + 1; p++)
      if (i + 1 + p < (1 << p)) return i + 1 + p;
    return 0;
  endfunction

  // Mask of the data bits (of an n-bit state) covered by parity group k.
  function automatic data_t parity_group(input int n, input int k);
    data_t g = '0;
    for (int i = 0; i < MAX_DATA; i++)
      if (i < n) g[i] = ((data_position(i) >> k) & 1) != 0;
    return g;
  endfunction

  // Parity bit of group k for an n-bit state (even parity over the group).
  function automatic logic calc_parity(input data_t state, input int n, input int k);
    return ^(state & parity_group(n, k));
  endfunction

  // All p parity bits of an n-bit state; bits above p-1 are zero.
  function automatic synd_t calc_parity_word(input data_t state, input int n, input int p);
    synd_t par = '0;
    for (int k = 0; k < MAX_PAR; k++)
      if (k < p) par[k] = calc_parity(state, n, k);
    return par;
  endfunction

endpackage
