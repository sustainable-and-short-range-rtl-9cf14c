// syndrome_decoder: W-to-2**W one-hot decoder of the Hamming checker bits.
//
// Output line j is high when the checker word equals j. Line 0 is the
// "no error" indication; line i (1 <= i <= N) enables the EXOR gate that
// inverts code word position i. With the (12,8) code W = 4 and this is the
// 4-to-16 decoder; the (7,4) code uses the 3-to-8 form.
//
// Interface: sel_i[W-1:0] in; onehot_o[2**W-1:0] out, exactly one bit set.
// Timing: purely combinational.
module syndrome_decoder #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0]      sel_i,
  output logic [2**W-1:0]   onehot_o
);

  always_comb begin
    for (int unsigned j = 0; j < 2**W; j++) begin
      onehot_o[j] = (sel_i == W'(j));
    end
  end

endmodule
