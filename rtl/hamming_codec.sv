// hamming_codec: Hamming encoder and decoder of one transceiver.
//
// The transmit half (hamming_encoder) turns an M-bit data word into an
// N-bit code word; the receive half (hamming_decoder) checks a received
// N-bit code word, corrects a single-bit error and returns the data word.
// The two halves are independent: the codec is the pair of them, as used by
// a DSRC transceiver that sends and receives.
//
// Interface: enc_data_i[M-1:0] -> enc_codeword_o[N:1], enc_parity_o[P-1:0];
// dec_codeword_i[N:1] -> dec_data_o[M-1:0], dec_corrected_o[N:1],
// dec_syndrome_o[P-1:0], dec_no_error_o, dec_corrected_flag_o,
// dec_uncorrectable_o. Code word bit i is position i.
// Timing: purely combinational; registers are left to the user.
module hamming_codec #(
  parameter  int unsigned M = dsrc_pkg::DATA_BITS,
  localparam int unsigned P = dsrc_pkg::parity_bits(M),
  localparam int unsigned N = M + P
) (
  input  logic [M-1:0] enc_data_i,
  output logic [N:1]   enc_codeword_o,
  output logic [P-1:0] enc_parity_o,
  input  logic [N:1]   dec_codeword_i,
  output logic [M-1:0] dec_data_o,
  output logic [N:1]   dec_corrected_o,
  output logic [P-1:0] dec_syndrome_o,
  output logic         dec_no_error_o,
  output logic         dec_corrected_flag_o,
  output logic         dec_uncorrectable_o
);

  hamming_encoder #(.M(M)) u_enc (
    .data_i    (enc_data_i),
    .codeword_o(enc_codeword_o),
    .parity_o  (enc_parity_o)
  );

  hamming_decoder #(.M(M)) u_dec (
    .codeword_i      (dec_codeword_i),
    .syndrome_o      (dec_syndrome_o),
    .corrected_o     (dec_corrected_o),
    .data_o          (dec_data_o),
    .no_error_o      (dec_no_error_o),
    .corrected_flag_o(dec_corrected_flag_o),
    .uncorrectable_o (dec_uncorrectable_o)
  );

endmodule
