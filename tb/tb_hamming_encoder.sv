// tb_hamming_encoder: exhaustive check of the Hamming encoder.
//
// Every 8-bit data word (and every 4-bit word on a (7,4) instance) is
// encoded and compared, position by position, with the reference code word
// of tb_ref_pkg. The worked example 11000101 -> 001010000101 (positions
// 1..12) is checked against the literal string.
module tb_hamming_encoder;
  import tb_ref_pkg::*;

  logic [7:0]  d8;
  logic [12:1] c8;
  logic [3:0]  p8;
  logic [3:0]  d4;
  logic [7:1]  c4;
  logic [2:0]  p4;
  int checks = 0, failures = 0;

  hamming_encoder dut8 (.data_i(d8), .codeword_o(c8), .parity_o(p8));
  hamming_encoder #(.M(4)) dut4 (.data_i(d4), .codeword_o(c4), .parity_o(p4));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d8 = 8'b1100_0101; d4 = '0;
    #1;
    checks++;
    if (c8 !== cw_from_str("001010000101")) begin
      failures++; $display("example code word %b", c8);
    end
    for (int v = 0; v < 256; v++) begin
      d8 = 8'(v);
      #1;
      checks += 2;
      if (c8 !== encode8(d8)) begin
        failures++;
        $display("M=8 data %b code word %b expected %b", d8, c8, encode8(d8));
      end
      if (p8 !== parity8(d8)) begin
        failures++;
        $display("M=8 data %b parity %b", d8, p8);
      end
    end
    for (int v = 0; v < 16; v++) begin
      d4 = 4'(v);
      #1;
      checks++;
      if (c4 !== encode4(d4)) begin
        failures++;
        $display("M=4 data %b code word %b expected %b", d4, c4, encode4(d4));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
