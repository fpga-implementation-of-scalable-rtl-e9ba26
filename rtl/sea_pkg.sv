// sea_pkg: constants and helper functions shared by the SEA_{n,b} cipher core.
//
// SEA_{n,b} is a Feistel block cipher whose block and key size n and word size
// b are parameters. A block is split into two halves of n/2 bits; each half is
// nb = n/(2b) words of b bits, word 0 in the least significant bits. The
// number of rounds nr may be derived from n and b: this package gives the
// derivation used by the core (nr = 3n/4 + 2(nb + b/2), made odd because the
// key schedule and decryption rely on an odd round count).
package sea_pkg;

  // Number of b-bit words in one n/2-bit Feistel branch.
  function automatic int unsigned sea_words(int unsigned n, int unsigned b);
    return n / (2 * b);
  endfunction

  // Default round count for SEA_{n,b}: 3n/4 + 2(nb + floor(b/2)), rounded up
  // to the next odd number.
  function automatic int unsigned sea_rounds(int unsigned n, int unsigned b);
    int unsigned nr;
    nr = (3 * n) / 4 + 2 * (sea_words(n, b) + b / 2);
    return nr | 1;
  endfunction

endpackage
