// hk3x_ref_pkg: reference models for the 3X generator testbenches.
//
// ref3x computes 3X by plain integer arithmetic on the sign-extended operand,
// independently of any H/K formulation. ref_hk evaluates the bit-serial H/K
// recurrences (H_0 = x_0, K_0 = 0; H_i = x_i H_{i-1} / K_i = x_i + K_{i-1}
// for odd i, H_i = x_i + H_{i-1} / K_i = x_i K_{i-1} for even i), used to
// check the internal H/K values the look-ahead and prefix blocks produce.
// rand_word gives up to 72 random bits. All widths are held in 72-bit words.
package hk3x_ref_pkg;

  localparam int unsigned W = 72;

  typedef logic [W-1:0] word_t;

  function automatic word_t mask(int unsigned n);
    return (n >= W) ? '1 : ((word_t'(1) << n) - 1);
  endfunction

  // 3X of the n-bit two's complement x, as an (n+2)-bit field
  function automatic word_t ref3x(word_t x, int unsigned n);
    logic signed [W-1:0] xs;
    xs = $signed(x << (W - n)) >>> (W - n);
    return word_t'(xs * 3) & mask(n + 2);
  endfunction

  function automatic void ref_hk(word_t x, int unsigned n,
                                 output word_t h, output word_t k);
    h = '0;
    k = '0;
    h[0] = x[0];
    for (int unsigned i = 1; i < n; i++) begin
      if (i % 2 == 1) begin
        h[i] = x[i] & h[i-1];
        k[i] = x[i] | k[i-1];
      end else begin
        h[i] = x[i] | h[i-1];
        k[i] = x[i] & k[i-1];
      end
    end
  endfunction

  function automatic word_t rand_word(int unsigned n);
    word_t r;
    r = W'({$urandom(), $urandom(), $urandom()});
    return r & mask(n);
  endfunction

  // Operands that make a carry travel from bit 0 or 1 to the top: the bits
  // from bit 1 upward alternate (every position propagates), bits 0/1 random,
  // and now and then the sign bit is flipped.
  function automatic word_t long_chain_word(int unsigned n);
    word_t r;
    r = '0;
    r[1:0] = 2'($urandom());
    for (int unsigned i = 2; i < n; i++) r[i] = ~r[i-1];
    if ($urandom_range(3, 0) == 0) r = r ^ (word_t'(1) << (n - 1));
    return r & mask(n);
  endfunction

endpackage
