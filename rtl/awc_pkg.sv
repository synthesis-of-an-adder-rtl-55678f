// awc_pkg -- types and functions shared by the adder of binary codes without carry.
//
// The adder works on a "ring" code system: an n-bit code is a window of n consecutive
// bits of a recurrent bit sequence x_j = XOR of x_{j-t} over the feedback taps t
// (for n = 4 the key is x_j = x_{j-4} XOR x_{j-1}). Sliding the window by one bit gives
// the next code; after 2^n - 1 slides the first code comes back, so the codes form a
// ring and the position of a code on the ring is the number it stands for. Adding two
// codes is sliding the first one by the position of the second. Because the recursion
// is linear, sliding by q positions is a fixed GF(2) matrix D'(q) applied to the code;
// bit i of the result is XOR over j of (d_ij AND a_j), with no carries between digits.
//
// Conventions used throughout the RTL:
//   * A code is held in an n-bit vector with its first digit (a1, the leftmost digit
//     as written) in the most significant bit.
//   * A coefficient matrix is coeff_t, element [i][j] = d_{(i+1)(j+1)}: sum digit i+1
//     takes a_{j+1}. Row i is the coefficient vector of window bit i over a_1..a_n.
//   * A flattened row of the coefficient memory places d_ij at bit (j-1)*n + (i-1),
//     so d11 is the least significant bit and d_nn the most significant one.
//   * taps bit t-1 set means x_{j-t} enters the recursion; taps = 4'b1001 for n = 4.
//
// Two logic families are supported. AND_XOR is the system built by the XOR key, which
// lacks the all-zero code. OR_XAND is its dual built by the XAND (XNOR) key, which
// lacks the all-one code; its codes are the bitwise complements of XOR-system codes,
// and an OR/XNOR circuit fed with complemented coefficients computes the complemented
// sum. The dual form of the recursion for more than two taps (complement of the XOR
// sequence) is this design's generalisation; the document states it for four bits.
package awc_pkg;

  // Largest code width any function here handles.
  localparam int unsigned MAXN = 16;

  typedef enum logic {
    AND_XOR = 1'b0,   // AND gates feeding an XOR pairing tree (Figs. 1, 2, 4)
    OR_XAND = 1'b1    // OR gates feeding an XNOR ("XAND") pairing tree (Fig. 3)
  } awc_logic_e;

  typedef logic [MAXN-1:0]           code_t;
  typedef logic [MAXN-1:0][MAXN-1:0] coeff_t;

  // Mask with the low n bits set.
  function automatic code_t low_mask(int unsigned n);
    code_t m;
    m = '0;
    for (int unsigned k = 0; k < MAXN; k++)
      if (k < n) m[k] = 1'b1;
    return m;
  endfunction

  // One slide of the window in the XOR system: drop the first digit, append the
  // recursion bit computed from the taps.
  function automatic code_t xor_step(code_t c, int unsigned n, code_t taps);
    logic nb;
    nb = ^(c & taps & low_mask(n));
    return ((c << 1) | code_t'(nb)) & low_mask(n);
  endfunction

  // One slide in the chosen logic family. The XAND system is the complement of the
  // XOR system, so its step complements, steps and complements back.
  function automatic code_t ring_step(code_t c, int unsigned n, code_t taps, awc_logic_e lg);
    code_t m;
    m = low_mask(n);
    if (lg == AND_XOR) return xor_step(c, n, taps);
    return ~xor_step(~c & m, n, taps) & m;
  endfunction

  // Identity coefficient matrix: D'(0), sliding by zero positions.
  function automatic coeff_t coeff_identity(int unsigned n);
    coeff_t m;
    m = '0;
    for (int unsigned k = 0; k < MAXN; k++)
      if (k < n) m[k][k] = 1'b1;
    return m;
  endfunction

  // D'(q+1) from D'(q): every window bit moves up one place and the last one is the
  // recursion applied to the coefficient vectors (dependencies (7) of the document).
  function automatic coeff_t coeff_step(coeff_t m, int unsigned n, code_t taps);
    coeff_t r;
    code_t  nb;
    r  = '0;
    nb = '0;
    for (int unsigned k = 0; k + 1 < MAXN; k++)
      if (k + 1 < n) r[k] = m[k+1];
    for (int unsigned t = 1; t <= MAXN; t++)
      if (t <= n && taps[t-1]) nb ^= m[n-t];
    if (n > 0) r[n-1] = nb;
    return r;
  endfunction

  // Coefficient matrix for a slide by q positions.
  function automatic coeff_t coeff_matrix(int unsigned q, int unsigned n, code_t taps);
    coeff_t m;
    m = coeff_identity(n);
    for (int unsigned s = 0; s < q; s++)
      m = coeff_step(m, n, taps);
    return m;
  endfunction

  // Number of codes on the ring, 2^n - 1.
  function automatic int unsigned ring_len(int unsigned n);
    return (1 << n) - 1;
  endfunction

endpackage
