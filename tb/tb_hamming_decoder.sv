// tb_hamming_decoder: check of the single-error-correcting decoder.
//
// For every 8-bit data word the reference code word is applied intact and
// with each single position flipped: the data and the full code word must
// come back corrected, the syndrome must name the flipped position, and the
// no_error / corrected flags must match. Random double flips must never be
// reported as "no error", and must be flagged uncorrectable exactly when the
// XOR of the two positions exceeds 12. The worked example (position 10 of
// 001010000101 corrupted) is checked literally. A (7,4) instance (3 checker
// bits, 3-to-8 decoder) gets every 4-bit word with every single error.
module tb_hamming_decoder;
  import tb_ref_pkg::*;

  logic [12:1] cw, corr;
  logic [3:0]  syn;
  logic [7:0]  data;
  logic        no_err, corr_flag, uncorr;
  logic [7:1]  cw4, corr4;
  logic [2:0]  syn4;
  logic [3:0]  data4;
  logic        no_err4, corr_flag4, uncorr4;
  int checks = 0, failures = 0;

  hamming_decoder dut (
    .codeword_i(cw), .syndrome_o(syn), .corrected_o(corr), .data_o(data),
    .no_error_o(no_err), .corrected_flag_o(corr_flag), .uncorrectable_o(uncorr)
  );

  hamming_decoder #(.M(4)) dut4 (
    .codeword_i(cw4), .syndrome_o(syn4), .corrected_o(corr4), .data_o(data4),
    .no_error_o(no_err4), .corrected_flag_o(corr_flag4), .uncorrectable_o(uncorr4)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cw %b)", what, cw); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cw4 = '0;
    cw = cw_from_str("001010000001");
    #1;
    check(syn == 4'b1010, "example syndrome");
    check(corr == cw_from_str("001010000101"), "example corrected word");
    check(data == 8'b1100_0101, "example data");
    check(corr_flag && !no_err && !uncorr, "example flags");

    for (int v = 0; v < 256; v++) begin
      for (int pos = 0; pos <= 12; pos++) begin
        cw = encode8(8'(v));
        if (pos != 0) cw[pos] = !cw[pos];
        #1;
        check(data == 8'(v), "data");
        check(corr == encode8(8'(v)), "corrected word");
        check(syn == 4'(pos), "syndrome");
        check(no_err == (pos == 0) && corr_flag == (pos != 0) && !uncorr, "flags");
      end
    end

    for (int t = 0; t < 2000; t++) begin
      int a, b;
      a = 1 + int'($urandom_range(11));
      b = 1 + int'($urandom_range(11));
      if (a == b) b = (a % 12) + 1;
      cw = encode8(8'($urandom));
      cw[a] = !cw[a];
      cw[b] = !cw[b];
      #1;
      check(!no_err, "double error seen as clean");
      check(syn == 4'(a ^ b), "double error syndrome");
      check(uncorr == ((a ^ b) > 12), "uncorrectable flag");
    end
    for (int v = 0; v < 16; v++) begin
      for (int pos = 0; pos <= 7; pos++) begin
        cw4 = encode4(4'(v));
        if (pos != 0) cw4[pos] = !cw4[pos];
        #1;
        check(data4 == 4'(v) && corr4 == encode4(4'(v)), "M=4 data and word");
        check(syn4 == 3'(pos) && no_err4 == (pos == 0) && corr_flag4 == (pos != 0) && !uncorr4,
              "M=4 flags");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
