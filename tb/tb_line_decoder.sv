// tb_line_decoder: check of the FM0 / Manchester / differential Manchester
// decoder.
//
// Chip words are produced by the transition-based reference encoder of
// tb_ref_pkg for random data in each code; the decoder must return the data
// one cycle later with no violation flagged. Then single chips are
// corrupted so that a required transition goes missing (both halves equal
// for Manchester and differential Manchester, no transition at the bit
// start for FM0): the violation flag of exactly that bit must rise.
module tb_line_decoder;
  import tb_ref_pkg::*;
  import dsrc_pkg::*;

  logic clk = 0, rst_n;
  line_code_e code;
  logic valid_i, valid_o;
  logic [7:0] chips;
  logic [3:0] data, viol;
  int checks = 0, failures = 0;
  int n_viol = 0;

  line_decoder dut (.clk, .rst_n, .code_i(code), .valid_i, .chips_i(chips),
                    .valid_o, .data_o(data), .violation_o(viol));

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

  initial begin
    logic level;
    logic [15:0] w;
    logic [3:0] d;
    for (int c = 0; c < 3; c++) begin
      code = line_code_e'(c);
      rst_n = 0; valid_i = 0; chips = '0;
      @(posedge clk); @(posedge clk); #1 rst_n = 1;
      level = 0;
      for (int k = 0; k < 300; k++) begin
        d = 4'($urandom);
        w = line_word(c, {4'b0, d}, 4, level);
        chips = w[7:0];
        valid_i = 1;
        @(posedge clk); #1;
        valid_i = 0;
        check(valid_o && data == d && viol == 4'b0,
              $sformatf("code %0d chips %b data %b viol %b expected %b", c, w[7:0], data, viol, d));
        if ($urandom_range(2) == 0) begin
          @(posedge clk); #1;
          check(!valid_o, "idle");
        end
      end
      // Violations: corrupt one bit's chips so that a transition is missing.
      for (int k = 0; k < 50; k++) begin
        int b;
        logic lvl_before;
        d = 4'($urandom);
        b = int'($urandom_range(3));
        lvl_before = level;
        w = line_word(c, {4'b0, d}, 4, level);
        if (c == 1) begin
          // FM0: first chip of bit b made equal to the level before it.
          logic prev;
          prev = (b == 3) ? lvl_before : w[2*b+2];
          w[2*b+1] = prev;
          // keep the following bits unaffected: first chip of bit b-1 still
          // compares with the unchanged second chip of bit b.
        end else begin
          w[2*b] = w[2*b+1];   // second half equal to the first
        end
        chips = w[7:0];
        valid_i = 1;
        @(posedge clk); #1;
        valid_i = 0;
        check(valid_o && viol == (4'b1 << b),
              $sformatf("code %0d bit %0d viol %b chips %b", c, b, viol, w[7:0]));
        if (viol != 0) n_viol++;
        // Resynchronise the reference level with what the decoder saw.
        level = w[0];
      end
    end
    check(n_viol > 0, "violations seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
