// tb_hamming_parity_gen: exhaustive check of the parity bit generator.
//
// Drives every data word into an 8-bit (default) and a 4-bit instance and
// compares the parity bits with the explicit Hamming parity equations in
// tb_ref_pkg. Also checks the worked example: data 11000101 gives parity
// P8P4P2P1 = 0000.
module tb_hamming_parity_gen;
  import tb_ref_pkg::*;

  logic [7:0] d8;
  logic [3:0] p8;
  logic [3:0] d4;
  logic [2:0] p4;
  int checks = 0, failures = 0;

  hamming_parity_gen dut8 (.data_i(d8), .parity_o(p8));
  hamming_parity_gen #(.M(4)) dut4 (.data_i(d4), .parity_o(p4));

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
    if (p8 !== 4'b0000) begin failures++; $display("example parity %b", p8); end
    for (int v = 0; v < 256; v++) begin
      d8 = 8'(v);
      #1;
      checks++;
      if (p8 !== parity8(d8)) begin
        failures++;
        $display("M=8 data %b parity %b expected %b", d8, p8, parity8(d8));
      end
    end
    for (int v = 0; v < 16; v++) begin
      d4 = 4'(v);
      #1;
      checks++;
      if (p4 !== parity4(d4)) begin
        failures++;
        $display("M=4 data %b parity %b expected %b", d4, p4, parity4(d4));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
