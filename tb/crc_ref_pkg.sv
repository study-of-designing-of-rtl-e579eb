// crc_ref_pkg: reference model for the CRC testbenches.
//
// Implements CRC by plain polynomial long division over GF(2), the textbook
// way and independently of the shift-register circuit under test: the
// dividend's highest set coefficient is cancelled by XORing in the generator
// shifted up to it, until the dividend's degree is below the generator's.
// Widths are fixed maxima; the actual lengths are arguments.
package crc_ref_pkg;

  localparam int unsigned MAX_N = 512;  // longest dividend, in bits
  localparam int unsigned MAX_K = 32;   // highest generator degree

  typedef logic [MAX_N-1:0] word_t;
  typedef logic [MAX_K-1:0] rem_t;

  // Remainder of data[n-1:0] divided by the degree-k generator whose lower
  // coefficients are g_low[k-1:0] (the x^k coefficient is 1).
  function automatic rem_t poly_mod(word_t data, int unsigned n,
                                    rem_t g_low, int unsigned k);
    word_t d;
    word_t g;
    d = data;
    g = '0;
    g[k] = 1'b1;
    for (int unsigned i = 0; i < k; i++) g[i] = g_low[i];
    for (int i = int'(n) - 1; i >= int'(k); i--) begin
      if (d[i]) d = d ^ (g << (i - int'(k)));
    end
    poly_mod = '0;
    for (int unsigned i = 0; i < k; i++) poly_mod[i] = d[i];
  endfunction

  // CRC check bits of an m-bit message: append k zeros, then divide.
  function automatic rem_t crc_of(word_t msg, int unsigned m,
                                  rem_t g_low, int unsigned k);
    crc_of = poly_mod(msg << k, m + k, g_low, k);
  endfunction

  // Random word with its low n bits random and the rest zero.
  function automatic word_t rand_word(int unsigned n);
    word_t w;
    for (int unsigned i = 0; i < MAX_N; i += 32) w[i +: 32] = $urandom();
    if (n < MAX_N) w &= ~(~word_t'(0) << n);
    rand_word = w;
  endfunction

endpackage
