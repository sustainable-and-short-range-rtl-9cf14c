// tb_hamming_checker_gen: check of the checker bit generator.
//
// For every 8-bit data word the reference code word is applied intact
// (checker word must be 0) and with each of the 12 positions flipped
// (checker word must equal the position). The worked example, position 10
// of 001010000101 corrupted, must give C4C3C2C1 = 1010.
module tb_hamming_checker_gen;
  import tb_ref_pkg::*;

  logic [12:1] cw;
  logic [3:0]  syn;
  int checks = 0, failures = 0;

  hamming_checker_gen dut (.codeword_i(cw), .syndrome_o(syn));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cw = cw_from_str("001010000001");
    #1;
    checks++;
    if (syn !== 4'b1010) begin failures++; $display("example syndrome %b", syn); end
    for (int v = 0; v < 256; v++) begin
      for (int pos = 0; pos <= 12; pos++) begin
        cw = encode8(8'(v));
        if (pos != 0) cw[pos] = !cw[pos];
        #1;
        checks++;
        if (syn !== 4'(pos)) begin
          failures++;
          $display("data %0d flip %0d syndrome %0d", v, pos, syn);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
