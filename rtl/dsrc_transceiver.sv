// dsrc_transceiver: digital baseband of a short-range (DSRC) transceiver.
//
// Transmit chain: data bits are line-coded (FM0, Manchester or differential
// Manchester, two chips per bit), the M chips of a word are protected by a
// Hamming encoder that adds P parity bits, and the N = M + P bit code word
// is handed to the ASK modulator. Receive chain: the code word from the ASK
// demodulator goes through the Hamming decoder, which corrects any single
// flipped bit, and the recovered chips are line-decoded back into data bits.
// The ASK modulator and demodulator are analog and not part of this module:
// tx_codeword_o and rx_codeword_i are where they connect. The order of the
// stages follows the transceiver's block diagram; word sizes, registering and
// the status outputs are choices of this design.
//
// With the default M = 8 one word carries 4 data bits, i.e. 8 chips, and a
// (12,8) Hamming code word.
//
// Interface (clk, active-low synchronous rst_n, code_i selects the line
// code for both directions and should only change between words):
//   TX: tx_valid_i, tx_data_i[M/2-1:0] (MSB sent first)
//       -> tx_valid_o, tx_codeword_o[N:1] (bit i = code word position i)
//   RX: rx_valid_i, rx_codeword_i[N:1]
//       -> rx_valid_o, rx_data_o[M/2-1:0], rx_violation_o[M/2-1:0] (line
//          code violation per bit), rx_syndrome_o[P-1:0] (checker bits),
//          rx_corrected_o (one bit was corrected), rx_uncorrectable_o
//          (syndrome names no position: multi-bit error).
// Timing: one word per cycle in each direction. TX latency 2 cycles (line
// encoder register, code word register); RX latency 3 cycles (input
// register, decoder output register, line decoder register).
module dsrc_transceiver #(
  parameter  int unsigned M = dsrc_pkg::DATA_BITS,
  localparam int unsigned P = dsrc_pkg::parity_bits(M),
  localparam int unsigned N = M + P,
  localparam int unsigned B = M / 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  dsrc_pkg::line_code_e code_i,
  // transmit
  input  logic                 tx_valid_i,
  input  logic [B-1:0]         tx_data_i,
  output logic                 tx_valid_o,
  output logic [N:1]           tx_codeword_o,
  // receive
  input  logic                 rx_valid_i,
  input  logic [N:1]           rx_codeword_i,
  output logic                 rx_valid_o,
  output logic [B-1:0]         rx_data_o,
  output logic [B-1:0]         rx_violation_o,
  output logic [P-1:0]         rx_syndrome_o,
  output logic                 rx_corrected_o,
  output logic                 rx_uncorrectable_o
);

  if (M % 2 != 0) begin : g_bad_m
    $error("dsrc_transceiver: M must be even (two chips per data bit)");
  end

  // ---------------- transmit ----------------
  logic         tx_chips_valid;
  logic [M-1:0] tx_chips;
  logic [N:1]   enc_codeword;
  logic [P-1:0] enc_parity;

  line_encoder #(.BITS(B)) u_line_enc (
    .clk    (clk),
    .rst_n  (rst_n),
    .code_i (code_i),
    .valid_i(tx_valid_i),
    .data_i (tx_data_i),
    .valid_o(tx_chips_valid),
    .chips_o(tx_chips)
  );

  // ---------------- Hamming codec ----------------
  logic         rx_v1;
  logic [N:1]   rx_cw1;
  logic [M-1:0] dec_data;
  logic [N:1]   dec_corrected;
  logic [P-1:0] dec_syndrome;
  logic         dec_no_error, dec_corr_flag, dec_uncorr;

  hamming_codec #(.M(M)) u_codec (
    .enc_data_i          (tx_chips),
    .enc_codeword_o      (enc_codeword),
    .enc_parity_o        (enc_parity),
    .dec_codeword_i      (rx_cw1),
    .dec_data_o          (dec_data),
    .dec_corrected_o     (dec_corrected),
    .dec_syndrome_o      (dec_syndrome),
    .dec_no_error_o      (dec_no_error),
    .dec_corrected_flag_o(dec_corr_flag),
    .dec_uncorrectable_o (dec_uncorr)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tx_valid_o    <= 1'b0;
      tx_codeword_o <= '0;
    end else begin
      tx_valid_o <= tx_chips_valid;
      if (tx_chips_valid) tx_codeword_o <= enc_codeword;
    end
  end

  // ---------------- receive ----------------
  logic         rx_v2;
  logic [M-1:0] rx_chips2;
  logic [P-1:0] rx_syn2;
  logic         rx_corr2, rx_uncorr2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rx_v1      <= 1'b0;
      rx_cw1     <= '0;
      rx_v2      <= 1'b0;
      rx_chips2  <= '0;
      rx_syn2    <= '0;
      rx_corr2   <= 1'b0;
      rx_uncorr2 <= 1'b0;
    end else begin
      rx_v1 <= rx_valid_i;
      if (rx_valid_i) rx_cw1 <= rx_codeword_i;
      rx_v2 <= rx_v1;
      if (rx_v1) begin
        rx_chips2  <= dec_data;
        rx_syn2    <= dec_syndrome;
        rx_corr2   <= dec_corr_flag;
        rx_uncorr2 <= dec_uncorr;
      end
    end
  end

  line_decoder #(.BITS(B)) u_line_dec (
    .clk        (clk),
    .rst_n      (rst_n),
    .code_i     (code_i),
    .valid_i    (rx_v2),
    .chips_i    (rx_chips2),
    .valid_o    (rx_valid_o),
    .data_o     (rx_data_o),
    .violation_o(rx_violation_o)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rx_syndrome_o      <= '0;
      rx_corrected_o     <= 1'b0;
      rx_uncorrectable_o <= 1'b0;
    end else if (rx_v2) begin
      rx_syndrome_o      <= rx_syn2;
      rx_corrected_o     <= rx_corr2;
      rx_uncorrectable_o <= rx_uncorr2;
    end
  end

  // The decoder reports at most one outcome per word.
  a_one_outcome: assert property (@(posedge clk) disable iff (!rst_n)
    rx_v1 |-> $onehot({dec_no_error, dec_corr_flag, dec_uncorr}));

  // enc_parity and dec_corrected are kept for observation in simulation.
  logic unused_ok;
  assign unused_ok = ^{enc_parity, dec_corrected};

endmodule
