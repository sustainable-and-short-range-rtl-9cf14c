// tb_line_encoder: check of the FM0 / Manchester / differential Manchester
// encoder against the transition-based reference in tb_ref_pkg.
//
// A stream of random 4-bit words is sent in each code, with idle cycles
// between some words (the line level must be held across them) and a code
// change in the middle of the run. Each output word must appear exactly one
// cycle after its input and match the reference chips. A fixed pattern
// checks the literal chips of each code from reset.
module tb_line_encoder;
  import tb_ref_pkg::*;
  import dsrc_pkg::*;

  logic clk = 0, rst_n;
  line_code_e code;
  logic valid_i, valid_o;
  logic [3:0] data;
  logic [7:0] chips;
  int checks = 0, failures = 0;

  line_encoder dut (.clk, .rst_n, .code_i(code), .valid_i, .data_i(data),
                    .valid_o, .chips_o(chips));

  always #5 clk = !clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic do_reset();
    rst_n = 0; valid_i = 0; data = '0;
    @(posedge clk); @(posedge clk);
    #1 rst_n = 1;
  endtask

  // Sends one word and checks it one clock later.
  task automatic send(input logic [3:0] d, inout logic level);
    logic [15:0] exp;
    exp = line_word(int'(code), {4'b0, d}, 4, level);
    valid_i = 1; data = d;
    @(posedge clk); #1;
    valid_i = 0;
    check(valid_o == 1, "valid one cycle later");
    check(chips == exp[7:0], $sformatf("chips %b expected %b code %0d", chips, exp[7:0], code));
  endtask

  initial begin
    logic level;
    // Literal patterns from reset, data 1010 -> chips.
    code = LC_MANCHESTER; do_reset(); level = 0;
    valid_i = 1; data = 4'b1010; @(posedge clk); #1 valid_i = 0;
    check(chips == 8'b01_10_01_10, "Manchester literal");
    code = LC_FM0; do_reset();
    valid_i = 1; data = 4'b1010; @(posedge clk); #1 valid_i = 0;
    check(chips == 8'b11_01_00_10, "FM0 literal");
    code = LC_DIFF_MANCHESTER; do_reset();
    valid_i = 1; data = 4'b1010; @(posedge clk); #1 valid_i = 0;
    check(chips == 8'b01_01_10_10, "differential Manchester literal");

    for (int c = 0; c < 3; c++) begin
      code = line_code_e'(c);
      do_reset();
      level = 0;
      for (int w = 0; w < 200; w++) begin
        send(4'($urandom), level);
        if ($urandom_range(3) == 0) begin
          @(posedge clk); #1;
          check(valid_o == 0, "idle cycle");
        end
        if (w == 100) code = line_code_e'((c + 1) % 3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
