// vedic_pkg: sizing helpers shared by the Urdhva Tiryakbhyam multiplier.
//
// In a WIDTH x WIDTH "vertically and crosswise" multiplication, product
// column k (weight 2^k, k = 0 .. 2*WIDTH-2) holds every bit product a[i]&b[j]
// with i+j = k. Each column is added together with the carry coming from
// the column to its right; the sum's LSB is the result bit of that column
// and the remaining bits are the carry passed on to the left. The functions
// here give, at elaboration time, how many bit products a column has and
// how wide each carry bus must be so that no value can be lost. They are
// pure constant functions; the package holds no state.
package vedic_pkg;

  // Number of bit products in column k of a width x width multiplication.
  function automatic int col_pp(int k, int width);
    return (k < width) ? k + 1 : 2 * width - 1 - k;
  endfunction

  // Largest carry value leaving column k: the column's worst-case total is
  // its product count plus the largest incoming carry, and the outgoing
  // carry is that total shifted right by one.
  function automatic int carry_max(int k, int width);
    int c;
    c = 0;
    for (int j = 0; j <= k; j++) c = (col_pp(j, width) + c) / 2;
    return c;
  endfunction

  // Bits needed to hold the values 0 .. v (at least one bit).
  function automatic int bits_for(int v);
    return (v <= 1) ? 1 : $clog2(v + 1);
  endfunction

  // Width of the carry bus leaving column k.
  function automatic int carry_w(int k, int width);
    return bits_for(carry_max(k, width));
  endfunction

  // Widest carry bus anywhere in the multiplier.
  function automatic int carry_w_max(int width);
    int m;
    m = 1;
    for (int k = 0; k <= 2 * width - 2; k++)
      if (carry_w(k, width) > m) m = carry_w(k, width);
    return m;
  endfunction

endpackage
