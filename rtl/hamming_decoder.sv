// hamming_decoder: single-error-correcting Hamming decoder.
//
// Three stages, all combinational:
//   1. hamming_checker_gen forms the checker word {C(P)..C1} (the syndrome).
//   2. syndrome_decoder turns it into one-hot lines; line 0 means no error.
//   3. One EXOR gate per code word position i inverts the received bit when
//      decoder line i is high, which repairs any single-bit error.
// The data word is then read back from the non-power-of-two positions, most
// significant data bit from the lowest position (the encoder's packing).
// Example (M = 8): received 001010000001 (positions 1..12, position 10
// corrupted) gives checker word 4'b1010 and corrected word 001010000101,
// data 8'b1100_0101.
//
// A syndrome that names no position of the word (13, 14 or 15 for the
// (12,8) code) can only come from a multi-bit error; the word is passed on
// uncorrected and uncorrectable_o is raised. That flag is this design's
// addition; the rest follows the standard Hamming decoder.
//
// Interface: codeword_i[N:1] in; syndrome_o[P-1:0], corrected_o[N:1],
// data_o[M-1:0], no_error_o, corrected_flag_o (a bit was flipped),
// uncorrectable_o out. Timing: purely combinational.
module hamming_decoder #(
  parameter  int unsigned M = dsrc_pkg::DATA_BITS,
  localparam int unsigned P = dsrc_pkg::parity_bits(M),
  localparam int unsigned N = M + P
) (
  input  logic [N:1]   codeword_i,
  output logic [P-1:0] syndrome_o,
  output logic [N:1]   corrected_o,
  output logic [M-1:0] data_o,
  output logic         no_error_o,
  output logic         corrected_flag_o,
  output logic         uncorrectable_o
);

  logic [2**P-1:0] line;

  hamming_checker_gen #(.M(M)) u_checker (
    .codeword_i(codeword_i),
    .syndrome_o(syndrome_o)
  );

  syndrome_decoder #(.W(P)) u_dec (
    .sel_i   (syndrome_o),
    .onehot_o(line)
  );

  // Correcting EXOR gates, one per position.
  always_comb begin
    for (int unsigned i = 1; i <= N; i++) begin
      corrected_o[i] = codeword_i[i] ^ line[i];
    end
  end

  // Data extraction from the corrected word.
  always_comb begin
    int unsigned d;
    d = M;
    data_o = '0;
    for (int unsigned i = 1; i <= N; i++) begin
      if (!dsrc_pkg::is_parity_pos(i)) begin
        d = d - 1;
        data_o[d] = corrected_o[i];
      end
    end
  end

  assign no_error_o       = line[0];
  assign uncorrectable_o  = (int'(syndrome_o) > int'(N));
  assign corrected_flag_o = !no_error_o && !uncorrectable_o;

endmodule
