// hamming_pkg: sizes and helper functions shared by the Hamming encoder and decoder.
//
// The code protects DATA_W information bits with PAR_W even-parity redundancy bits.
// PAR_W is the smallest r with 2**r >= DATA_W + r + 1, so 64 data bits need 7
// redundancy bits and the code word is 71 bits long. Code word positions are
// numbered 1..CODE_W, as in classic Hamming code: a redundancy bit sits at every
// power-of-two position (1, 2, 4, ..., 64) and the data bits fill the remaining
// positions in order (data bit 1 at position 3, data bit 2 at position 5, ...).
// Redundancy bit R(2**r) is the even parity of every position whose index has bit r set.
// The sizing rule and the positions are those of the design; writing them as
// functions of DATA_W, so other widths also elaborate, is this code's choice.
package hamming_pkg;

  localparam int unsigned DATA_W_DEFAULT = 64;

  // Smallest r with 2**r >= m + r + 1.
  function automatic int unsigned par_bits(input int unsigned m);
    int unsigned r;
    r = 0;
    while ((1 << r) < m + r + 1) r++;
    return r;
  endfunction

  // True when code position p (1-based) holds a redundancy bit.
  function automatic bit is_par_pos(input int unsigned p);
    return (p != 0) && ((p & (p - 1)) == 0);
  endfunction

endpackage
