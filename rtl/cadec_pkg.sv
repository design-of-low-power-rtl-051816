// cadec_pkg: sizes shared by the CADEC (crosstalk avoiding double error
// correction) codec and the link ports that use it.
//
// The flit width K defaults to 32 bits. The inner code is a shortened Hamming
// code with R check bits, the smallest R with 2**R >= K + R + 1 (6 for K = 32,
// giving the (38,32) code). The CADEC word duplicates each of the N = K + R
// Hamming bits onto two adjacent wires and adds one overall parity wire, so it
// is 2*N + 1 wires wide (77 for K = 32).
//
// Hamming bit layout (this design's choice, the classic one): codeword bit i
// is Hamming position i+1; check bits sit at the power-of-two positions
// 1, 2, 4, 8, 16, 32 and data bits fill the other positions in increasing
// order. The syndrome of a word is then the XOR of the positions of its ones,
// and a non-zero syndrome s <= N names the position of a single flipped bit.
package cadec_pkg;

  // Number of Hamming check bits for k data bits.
  function automatic int unsigned ham_r(input int unsigned k);
    int unsigned r;
    r = 1;
    while ((1 << r) < k + r + 1) r++;
    return r;
  endfunction

  // True when Hamming position p (1-based) holds a check bit.
  function automatic bit is_pow2(input int unsigned p);
    return (p != 0) && ((p & (p - 1)) == 0);
  endfunction

  // Default flit width; the modules derive R = 6, N = 38 and 77 wires from it.
  localparam int unsigned FLIT_W = 32;

endpackage
