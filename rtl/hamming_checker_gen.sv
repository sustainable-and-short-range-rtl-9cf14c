// hamming_checker_gen: checker bit generator of the Hamming decoder.
//
// Recomputes each parity check over the received N-bit code word, this time
// including the parity bit itself. Checker bit C(k+1) is the XOR of every
// position whose index has bit k set; for the (12,8) code
//   C1 = P1 ^ D3 ^ D5 ^ D7 ^ D9 ^ D11   C2 = P2 ^ D3 ^ D6 ^ D7 ^ D10 ^ D11
//   C3 = P4 ^ D5 ^ D6 ^ D7 ^ D12        C4 = P8 ^ D9 ^ D10 ^ D11 ^ D12
// The checker word {C4,C3,C2,C1} is zero for a valid code word and equals
// the position of the flipped bit when exactly one bit is in error (for
// example 4'b1010 when position 10 is corrupted).
//
// Interface: codeword_i[N:1] in (bit i = position i); syndrome_o[P-1:0] out,
// syndrome_o[k] = C(k+1). Timing: purely combinational.
module hamming_checker_gen #(
  parameter  int unsigned M = dsrc_pkg::DATA_BITS,
  localparam int unsigned P = dsrc_pkg::parity_bits(M),
  localparam int unsigned N = M + P
) (
  input  logic [N:1]   codeword_i,
  output logic [P-1:0] syndrome_o
);

  always_comb begin
    for (int unsigned k = 0; k < P; k++) begin
      syndrome_o[k] = 1'b0;
      for (int unsigned i = 1; i <= N; i++) begin
        if (((i >> k) & 1) == 1) syndrome_o[k] = syndrome_o[k] ^ codeword_i[i];
      end
    end
  end

endmodule
