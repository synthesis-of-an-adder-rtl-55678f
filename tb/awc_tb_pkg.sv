// awc_tb_pkg -- reference model shared by the testbenches of the carry-free adder.
//
// It works on codes only, never on coefficient matrices: a code system is generated by
// stepping a plain shift register with the recursion key, a code's number is how many
// steps it lies from the initial code, and a sum is found by stepping the first code
// as many times as the second code's number. Codes hold their first digit in the most
// significant bit; a key has bit t-1 set for each x_{j-t} in x_j = XOR x_{j-t}.
package awc_tb_pkg;

  typedef logic [15:0] tcode_t;

  function automatic tcode_t tmask(int n);
    return tcode_t'((32'd1 << n) - 1);
  endfunction

  // Next code of the XOR system: shift left, append the key bit.
  function automatic tcode_t ref_next(tcode_t c, int n, tcode_t key);
    logic b;
    b = 1'b0;
    for (int t = 1; t <= n; t++)
      if (key[t-1]) b ^= c[t-1];
    return ((c << 1) | tcode_t'(b)) & tmask(n);
  endfunction

  // Next code of the XAND system with the two-tap key x_j = XNOR(x_{j-4}, x_{j-1}),
  // written straight from the key (4-bit only).
  function automatic tcode_t ref_next_xand4(tcode_t c);
    return {12'b0, c[2:0], ~(c[3] ^ c[0])};
  endfunction

  // Slide a code q steps along the XOR ring.
  function automatic tcode_t ref_slide(tcode_t c, int q, int n, tcode_t key);
    for (int k = 0; k < q; k++) c = ref_next(c, n, key);
    return c;
  endfunction

  // Number of a code in the XOR system started at init; -1 if it is not on the ring.
  function automatic int ref_index(tcode_t v, tcode_t init, int n, tcode_t key);
    tcode_t c;
    c = init;
    for (int q = 0; q < (1 << n) - 1; q++) begin
      if (c == v) return q;
      c = ref_next(c, n, key);
    end
    return -1;
  endfunction

  // Coefficient row for sliding by q, with d_ij at bit (j-1)*n + (i-1). Column j is the
  // unit code with only digit j set, slid q steps (the slide is linear).
  function automatic logic [255:0] ref_row(int q, int n, tcode_t key);
    logic [255:0] r;
    tcode_t       w;
    r = '0;
    for (int j = 0; j < n; j++) begin
      w = ref_slide(tcode_t'(1) << (n - 1 - j), q, n, key);
      for (int i = 0; i < n; i++) r[j*n + i] = w[n-1-i];
    end
    return r;
  endfunction

endpackage
