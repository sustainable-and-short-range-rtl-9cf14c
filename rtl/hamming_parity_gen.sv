// hamming_parity_gen: parity bit generator of the Hamming encoder.
//
// Computes the P parity bits of an M-bit data word. The data bits are first
// spread over their code word positions (3, 5, 6, 7, 9, 10, 11, 12 for
// M = 8, most significant data bit first); parity bit P(2**k) is then the
// XOR of every data position whose index has bit k set. For M = 8 this is
//   P1 = D3 ^ D5 ^ D7 ^ D9 ^ D11      P2 = D3 ^ D6 ^ D7 ^ D10 ^ D11
//   P4 = D5 ^ D6 ^ D7 ^ D12           P8 = D9 ^ D10 ^ D11 ^ D12
// which are the four XOR trees of the 8-bit encoder; with M = 4 it is the
// three-tree 4-bit encoder. The equations and the position numbering are
// the Hamming code's own; only the packing of the data word (MSB first) is
// a choice of this design (see dsrc_pkg).
//
// Interface: data_i[M-1:0] in, parity_o[P-1:0] out, parity_o[k] = P(2**k).
// Timing: purely combinational, P XOR trees of depth ceil(log2(M)).
module hamming_parity_gen #(
  parameter  int unsigned M = dsrc_pkg::DATA_BITS,
  localparam int unsigned P = dsrc_pkg::parity_bits(M),
  localparam int unsigned N = M + P
) (
  input  logic [M-1:0] data_i,
  output logic [P-1:0] parity_o
);

  logic [N:1] spread;  // data at its code word positions, zeros elsewhere

  always_comb begin
    int unsigned d;
    spread = '0;
    d = M;
    for (int unsigned i = 1; i <= N; i++) begin
      if (!dsrc_pkg::is_parity_pos(i)) begin
        d = d - 1;
        spread[i] = data_i[d];
      end
    end
  end

  always_comb begin
    for (int unsigned k = 0; k < P; k++) begin
      parity_o[k] = 1'b0;
      for (int unsigned i = 1; i <= N; i++) begin
        if (((i >> k) & 1) == 1) parity_o[k] = parity_o[k] ^ spread[i];
      end
    end
  end

endmodule
