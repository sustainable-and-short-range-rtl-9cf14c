// hamming_encoder: single-error-correcting Hamming encoder.
//
// Forms the N = M + P bit code word from an M-bit data word: the parity bit
// generator (hamming_parity_gen) supplies P1, P2, P4, P8, ... which are
// placed at the power-of-two positions, and the data bits fill the remaining
// positions in ascending order, most significant data bit first. For the
// default M = 8 this is a (12,8) code; M = 4 gives the (7,4) code.
// Example (M = 8): data 8'b1100_0101 gives parity 0000 and the code word
// whose positions 1..12 read 001010000101.
//
// Interface: data_i[M-1:0] in; codeword_o[N:1] out, bit i = position i;
// parity_o[P-1:0] out, parity_o[k] = P(2**k), for observation.
// Timing: purely combinational.
module hamming_encoder #(
  parameter  int unsigned M = dsrc_pkg::DATA_BITS,
  localparam int unsigned P = dsrc_pkg::parity_bits(M),
  localparam int unsigned N = M + P
) (
  input  logic [M-1:0] data_i,
  output logic [N:1]   codeword_o,
  output logic [P-1:0] parity_o
);

  hamming_parity_gen #(.M(M)) u_parity (
    .data_i  (data_i),
    .parity_o(parity_o)
  );

  always_comb begin
    int unsigned d;
    int unsigned k;
    d = M;
    k = 0;
    codeword_o = '0;
    for (int unsigned i = 1; i <= N; i++) begin
      if (dsrc_pkg::is_parity_pos(i)) begin
        codeword_o[i] = parity_o[k];
        k = k + 1;
      end else begin
        d = d - 1;
        codeword_o[i] = data_i[d];
      end
    end
  end

endmodule
