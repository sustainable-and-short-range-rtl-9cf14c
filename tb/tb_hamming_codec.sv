// tb_hamming_codec: encoder-to-decoder loop through a noisy channel.
//
// Random data words are encoded by the codec's transmit half; the code word
// is checked against the reference, then zero or one random position is
// flipped and the word is decoded by the receive half, which must return
// the original data with the matching flags. Also checks the worked
// example of the encoder (11000101 -> 001010000101).
module tb_hamming_codec;
  import tb_ref_pkg::*;

  logic [7:0]  enc_d, dec_d;
  logic [12:1] enc_cw, dec_cw, dec_corr;
  logic [3:0]  enc_p, dec_syn;
  logic        no_err, corr_flag, uncorr;
  int checks = 0, failures = 0;
  int n_clean = 0, n_fixed = 0;

  hamming_codec dut (
    .enc_data_i(enc_d), .enc_codeword_o(enc_cw), .enc_parity_o(enc_p),
    .dec_codeword_i(dec_cw), .dec_data_o(dec_d), .dec_corrected_o(dec_corr),
    .dec_syndrome_o(dec_syn), .dec_no_error_o(no_err),
    .dec_corrected_flag_o(corr_flag), .dec_uncorrectable_o(uncorr)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s data %b", what, enc_d); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    enc_d = 8'b1100_0101; dec_cw = '0;
    #1;
    check(enc_cw == cw_from_str("001010000101") && enc_p == 4'b0000, "example");
    for (int t = 0; t < 3000; t++) begin
      int pos;
      enc_d = 8'($urandom);
      pos = int'($urandom_range(12));
      #1;
      check(enc_cw == encode8(enc_d), "encoder");
      dec_cw = enc_cw;
      if (pos != 0) dec_cw[pos] = !dec_cw[pos];
      #1;
      check(dec_d == enc_d, "decoded data");
      check(dec_corr == enc_cw, "corrected word");
      check(dec_syn == 4'(pos) && no_err == (pos == 0) && corr_flag == (pos != 0) && !uncorr,
            "flags");
      if (pos == 0) n_clean++; else n_fixed++;
    end
    check(n_clean > 0 && n_fixed > 0, "both cases exercised");
    $display("clean words %0d, corrected words %0d", n_clean, n_fixed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
