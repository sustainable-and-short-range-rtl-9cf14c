// dsrc_pkg: types and constants shared by the DSRC transceiver blocks.
//
// Hamming code geometry. A code word of N = M + P bits carries M data bits
// and P parity bits, where P is the smallest number with 2**P >= M + P + 1.
// Bits are numbered by position 1..N, as in the usual Hamming notation:
// parity bits sit at the power-of-two positions 1, 2, 4, 8, ... and data
// bits fill the other positions in ascending order. Every module declares
// its code word as logic [N:1], so bit i of the vector is position i.
// The data word is taken most significant bit first: data[M-1] goes to the
// lowest data position (position 3), data[0] to the highest. With M = 8 the
// data word 8'b1100_0101 therefore becomes the code word whose positions
// 1..12 read 0 0 1 0 1 0 0 0 0 1 0 1.
//
// Line codes. The transmitter line-codes every data bit into two half-bit
// chips before Hamming encoding; the three codes a DSRC link may use are
// listed in line_code_e. The chip conventions are given in line_encoder.sv.
package dsrc_pkg;

  // Default data word length of the Hamming codec.
  localparam int unsigned DATA_BITS = 8;

  // Smallest P with 2**P >= m + P + 1 (number of Hamming parity bits).
  function automatic int unsigned parity_bits(input int unsigned m);
    int unsigned p;
    p = 0;
    for (int unsigned k = 0; k < 31; k++) begin
      if (((32'd1 << p) < m + p + 1)) p = p + 1;
    end
    return p;
  endfunction

  // True when position i (1-based) holds a parity bit.
  function automatic bit is_parity_pos(input int unsigned i);
    return (i != 0) && ((i & (i - 1)) == 0);
  endfunction

  // Line code selected for the chip stream.
  typedef enum logic [1:0] {
    LC_MANCHESTER      = 2'd0,
    LC_FM0             = 2'd1,
    LC_DIFF_MANCHESTER = 2'd2
  } line_code_e;

endpackage
