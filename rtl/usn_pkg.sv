// usn_pkg: shared constants and elaboration-time functions for the unfolded
// swapped network (USN) FFT.
//
// The network is URHSN(l_r, ..., l_1, B_n): a butterfly nucleus B_n (2^n
// rows, n+1 columns) unfolded r times, at depth d into l_d copies chained by
// swap links. Rows carry M = n * l_1 * ... * l_r bits, so the network
// computes a 2^M-point FFT. Along the column axis it is a chain of
// l_1 * ... * l_r nucleus copies ("blocks" 0, 1, ...); between block k and
// block k+1 sits a swap boundary that exchanges the lowest row digit with a
// higher one. The factors travel as one packed value lv (levels_vec).
//
// The functions below are pure and are only called with constant arguments,
// so they fold to constants at elaboration. They give:
//   * swap_row  - the row a swap-link node receives from (the swap rule),
//   * emu_row   - which row of the emulated 2^M-point butterfly a physical
//                 row of block k stands for (the FFT mapping),
//   * tw_exp    - the twiddle exponent of a butterfly node,
//   * tw_re/im  - that twiddle as a rounded fixed-point number.
// The swap rule, the emulated-row mapping and the twiddle rule follow the USN
// construction and its FFT mapping; the fixed-point scaling of the twiddles
// and the packing of per-depth unfolding factors are this design's choices.
package usn_pkg;

  function automatic int unsigned ipow(int unsigned b, int unsigned e);
    int unsigned r = 1;
    for (int unsigned i = 0; i < e; i++) r = r * b;
    return r;
  endfunction

  // Unfolding factor of every depth, packed 4 bits per depth with depth 1
  // (the innermost) in bits [3:0]: URHSN(l_r, ..., l_1, G) has l_d in
  // nibble d-1. A zero nibble in vec means the uniform factor l.
  function automatic int unsigned levels_vec(int unsigned l, int unsigned r, int unsigned vec);
    int unsigned lv = 0;
    for (int unsigned d = 0; d < r; d++) begin
      int unsigned ld = (vec >> (4 * d)) & 15;
      lv |= ((ld == 0) ? l : ld) << (4 * d);
    end
    return lv;
  endfunction

  function automatic int unsigned lvl(int unsigned lv, int unsigned d);
    return (lv >> (4 * (d - 1))) & 15;
  endfunction

  // Number of nucleus copies along the column axis: l_1 * ... * l_r.
  function automatic int unsigned num_blocks(int unsigned lv, int unsigned r);
    int unsigned nb = 1;
    for (int unsigned d = 1; d <= r; d++) nb = nb * lvl(lv, d);
    return nb;
  endfunction

  // Row bits of the whole network.
  function automatic int unsigned row_bits(int unsigned n, int unsigned lv, int unsigned r);
    return n * num_blocks(lv, r);
  endfunction

  // Swap boundary between block k and block k+1. Write k+1 in the mixed
  // radix (l_1, l_2, ...): the boundary belongs to the shallowest depth d
  // whose digit is non-zero. At that depth a row digit is n*l_1*...*l_(d-1)
  // bits wide and the swap exchanges digit 1 (the lowest) with digit i+1,
  // where i is that non-zero digit of k+1.
  function automatic int unsigned swap_digit_w(int unsigned n, int unsigned lv, int unsigned k);
    int unsigned t = k + 1;
    int unsigned w = n;
    int unsigned d = 1;
    while (d < 8 && t % lvl(lv, d) == 0) begin
      t = t / lvl(lv, d);
      w = w * lvl(lv, d);
      d++;
    end
    return w;
  endfunction

  function automatic int unsigned swap_digit_i(int unsigned lv, int unsigned k);
    int unsigned t = k + 1;
    int unsigned d = 1;
    while (d < 8 && t % lvl(lv, d) == 0) begin
      t = t / lvl(lv, d);
      d++;
    end
    return t % lvl(lv, d);
  endfunction

  // Exchange digit 1 and digit i+1 (each w bits) of row p. This is an
  // involution, so it names both where a swap link goes and where it comes from.
  function automatic int unsigned swap_row(int unsigned p, int unsigned n, int unsigned lv,
                                           int unsigned k);
    int unsigned w    = swap_digit_w(n, lv, k);
    int unsigned i    = swap_digit_i(lv, k);
    int unsigned mask = (1 << w) - 1;
    int unsigned lo   = p & mask;
    int unsigned hi   = (p >> (i * w)) & mask;
    int unsigned q    = p & ~mask & ~(mask << (i * w));
    return q | hi | (lo << (i * w));
  endfunction

  // Emulated butterfly row of physical row p inside block k: follow the data
  // back through the swap boundaries k-1, ..., 0 to the input column.
  function automatic int unsigned emu_row(int unsigned p, int unsigned n, int unsigned lv,
                                          int unsigned k);
    int unsigned e = p;
    for (int b = int'(k) - 1; b >= 0; b--) e = swap_row(e, n, lv, b);
    return e;
  endfunction

  // Twiddle exponent (power of w_N, N = 2^m) of the node in row p, column c
  // (1..n) of block k. That node performs stage s = k*n + c of the emulated
  // radix-2 FFT, whose twiddle is w_{2^s}^(E mod 2^s) = w_N^((E mod 2^s) 2^(m-s)).
  function automatic int unsigned tw_exp(int unsigned p, int unsigned c, int unsigned n,
                                         int unsigned lv, int unsigned m, int unsigned k);
    int unsigned s = k * n + c;
    int unsigned e = emu_row(p, n, lv, k);
    return (e & ((1 << s) - 1)) << (m - s);
  endfunction

  // w_N^e = cos(2 pi e / N) - j sin(2 pi e / N), scaled by 2^frac and rounded.
  function automatic int tw_re(int unsigned e, int unsigned m, int unsigned frac);
    real ang = 2.0 * 3.14159265358979323846 * real'(e) / real'(1 << m);
    return int'($cos(ang) * real'(1 << frac));
  endfunction

  function automatic int tw_im(int unsigned e, int unsigned m, int unsigned frac);
    real ang = 2.0 * 3.14159265358979323846 * real'(e) / real'(1 << m);
    return int'(-$sin(ang) * real'(1 << frac));
  endfunction

  // Index of the FFT output that leaves physical row p of the last block
  // (the network's output order is not the natural one).
  function automatic int unsigned out_index(int unsigned p, int unsigned n, int unsigned lv,
                                            int unsigned r);
    return emu_row(p, n, lv, num_blocks(lv, r) - 1);
  endfunction

  // ---- Two-stage network of unequal modules -------------------------------
  // 2^(a+b) rows: block 0 is 2^b butterfly modules of 2^a rows, block 1 is
  // 2^a modules of 2^b rows. Output j of block-0 module i is linked to input
  // i of block-1 module j, so block-1 row p = {j, i} receives from block-0
  // row {i, j}: the a low bits and the b high bits change places.
  function automatic int unsigned mix_src_row(int unsigned p, int unsigned a, int unsigned b);
    return ((p & ((1 << b) - 1)) << a) | (p >> b);
  endfunction

  // Twiddle exponent of the node in row p, column c of block k (0 or 1).
  function automatic int unsigned mix_tw_exp(int unsigned p, int unsigned c, int unsigned a,
                                             int unsigned b, int unsigned k);
    int unsigned s = (k == 0) ? c : a + c;
    int unsigned e = (k == 0) ? p : mix_src_row(p, a, b);
    return (e & ((1 << s) - 1)) << (a + b - s);
  endfunction

  // Row bits of a network: the uniform USN unless the unequal-module
  // parameters a, b are given (a > 0).
  function automatic int unsigned net_bits(int unsigned n, int unsigned l, int unsigned r,
                                           int unsigned vec, int unsigned a, int unsigned b);
    return (a > 0) ? a + b : row_bits(n, levels_vec(l, r, vec), r);
  endfunction

  // Bit reversal of the m-bit value v: input x_i enters at row bitrev(i).
  function automatic int unsigned bitrev(int unsigned v, int unsigned m);
    int unsigned res = 0;
    for (int unsigned b = 0; b < m; b++) res |= ((v >> b) & 1) << (m - 1 - b);
    return res;
  endfunction

endpackage
