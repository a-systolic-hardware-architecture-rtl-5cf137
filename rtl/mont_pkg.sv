// mont_pkg: constants and helper functions shared by the Montgomery multipliers.
//
// neg_inv_word() gives N' = -N^{-1} mod 2^k, the one precomputed constant of
// the word-level Montgomery algorithm (only the lowest word n_0 of the modulus
// is needed). It uses the Newton iteration x <- x*(2 - n*x), which doubles the
// number of correct low bits each step: x = n is already correct to 3 bits for
// any odd n, so five steps give 96 >= 64 correct bits. The result is computed
// at 64 bits and callers keep the low k bits (k <= 64). The modulus must be odd.
// The published algorithm takes N' as a precomputed input; computing it in
// hardware this way is a choice of this design.
package mont_pkg;

  localparam int unsigned MAX_WORD = 64;

  function automatic logic [MAX_WORD-1:0] neg_inv_word(input logic [MAX_WORD-1:0] n0);
    logic [MAX_WORD-1:0] x;
    x = n0;
    for (int s = 0; s < 5; s++) begin
      x = x * (64'd2 - n0 * x);
    end
    return -x;
  endfunction

endpackage
