// Coefficient table of the function evaluation unit's ROMs.
//
// The ROMs hold, for each of the 2^H selectable functions and each EEU i
// (i = 0 .. NEEU-1), the numerator coefficient p_i and the denominator
// coefficient q_i of a rational function
//
//   R(x) = (p_0 + p_1 x + ... ) / (1 + q_1 x + q_2 x^2 + ...)
//
// as fixed-point words with two integer bits (XX.XXX...). The contents are
// this design's own example set, chosen to meet the method's convergence
// conditions |p_i| <= 1/2 and |q_i| + |x| <= 31/128. For function number f
// (taken modulo 16), with k = f / 2 and c = (k - 4) / 4:
//
//   p_i = c^i / (2 * i!)                       (a truncated exp(c x) / 2)
//   q_i = (3/32)^i for i >= 1 when f is odd,   q_i = 0 when f is even
//
// so even functions are polynomials and odd ones rational functions (then
// |x| <= 19/128 keeps the conditions). q_0 is stored as 0; EEU 0 does not use
// its q. Each value is truncated toward zero to FR fraction bits. Words are
// computed here at elaboration, so the table scales with the word length.
package feu_coef_pkg;

  localparam int unsigned COEF_W = 256;
  typedef logic signed [COEF_W-1:0] coef_t;

  // Coefficient word scaled by 2^fr: p_i (is_p = 1) or q_i (is_p = 0) of
  // function f.
  function automatic coef_t coef_word(int unsigned f, int unsigned i, bit is_p, int unsigned fr);
    coef_t num, den, mag;
    int    c, ac;
    bit    neg;
    num = 1;
    den = 1;
    neg = 1'b0;
    if (is_p) begin
      c  = int'((f % 16) / 2) - 4;
      ac = (c < 0) ? -c : c;
      for (int unsigned j = 1; j <= i; j++) begin
        num = num * coef_t'(ac);
        den = den * coef_t'(4 * j);
      end
      den = den * 2;
      neg = (c < 0) && (i % 2 == 1);
      if (c == 0 && i > 0) num = 0;
    end else begin
      if (i == 0 || (f % 2) == 0) return '0;
      for (int unsigned j = 1; j <= i; j++) begin
        num = num * 3;
        den = den * 32;
      end
    end
    mag = (num <<< fr) / den;
    return neg ? -mag : mag;
  endfunction

  // Byte b (0 = high-order) of the nbbm-byte coefficient word.
  function automatic logic [7:0] coef_byte(int unsigned f, int unsigned i, bit is_p,
                                           int unsigned nbbm, int unsigned b);
    return 8'(coef_word(f, i, is_p, 8 * nbbm - 2) >>> (8 * (nbbm - 1 - b)));
  endfunction

endpackage
