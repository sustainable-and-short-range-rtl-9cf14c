// tb_syndrome_decoder: check of the 4-to-16 and 3-to-8 one-hot decoders.
//
// Every input value must raise exactly the output line of the same number.
module tb_syndrome_decoder;
  logic [3:0]  s4;
  logic [15:0] o4;
  logic [2:0]  s3;
  logic [7:0]  o3;
  int checks = 0, failures = 0;

  syndrome_decoder dut4 (.sel_i(s4), .onehot_o(o4));
  syndrome_decoder #(.W(3)) dut3 (.sel_i(s3), .onehot_o(o3));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s3 = '0;
    for (int v = 0; v < 16; v++) begin
      s4 = 4'(v);
      #1;
      checks++;
      if (o4 !== (16'd1 << v)) begin failures++; $display("in %0d out %b", v, o4); end
    end
    for (int v = 0; v < 8; v++) begin
      s3 = 3'(v);
      #1;
      checks++;
      if (o3 !== (8'd1 << v)) begin failures++; $display("in %0d out %b", v, o3); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
