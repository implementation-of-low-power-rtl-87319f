// hamming_pkg: sizing helpers for the Hamming encoder and decoder.
//
// par_bits(m) returns the smallest n with 2**n >= m + n + 1, the number of
// redundant bits a single-error-correcting Hamming code needs for m data
// bits. Code word bit i (0-based) holds code position i+1; the redundant
// bits sit at positions 1, 2, 4, 8, ... and the data bits fill the other
// positions in order, data bit 0 at position 3.
package hamming_pkg;

  function automatic int unsigned par_bits(input int unsigned m);
    int unsigned n;
    n = 1;
    while ((1 << n) < m + n + 1) n++;
    return n;
  endfunction

  function automatic bit is_pow2(input int unsigned p);
    return (p != 0) && ((p & (p - 1)) == 0);
  endfunction

endpackage
