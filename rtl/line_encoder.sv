// line_encoder: FM0 / Manchester / differential Manchester line encoder.
//
// Each data bit becomes two half-bit chips (first half, second half). The
// word's most significant bit is sent first, and its chips occupy the top
// two bits of chips_o: bit b of data_i gives chips_o[2b+1] (first half) and
// chips_o[2b] (second half). The three codes, with L the line level at the
// end of the previous bit:
//   Manchester (IEEE 802.3 polarity): 1 -> 01, 0 -> 10.
//   FM0 (bi-phase space): the level always inverts at the start of a bit;
//       a 0 inverts again at mid-bit, a 1 does not.
//       first = ~L, second = bit ? first : ~first.
//   Differential Manchester: the level always inverts at mid-bit; a 0 also
//       inverts at the start of the bit, a 1 does not.
//       first = bit ? L : ~L, second = ~first.
// L is kept in a register across words, so consecutive words form one
// continuous chip stream; it is 0 after reset. The choice of codes comes
// from the transceiver's block diagram; the polarity conventions, the word
// packing and the reset level are choices of this design.
//
// Interface: clk, rst_n (active-low, synchronous), code_i (dsrc_pkg::
// line_code_e), valid_i with data_i[BITS-1:0]; valid_o with
// chips_o[2*BITS-1:0]. Timing: one word per cycle, output registered, one
// cycle of latency. code_i may change between words.
module line_encoder #(
  parameter int unsigned BITS = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  dsrc_pkg::line_code_e  code_i,
  input  logic                  valid_i,
  input  logic [BITS-1:0]       data_i,
  output logic                  valid_o,
  output logic [2*BITS-1:0]     chips_o
);
  import dsrc_pkg::*;

  logic                level_q;   // line level at the end of the last bit sent
  logic                level_d;
  logic [2*BITS-1:0]   chips_d;

  always_comb begin
    logic lvl, c0, c1, b;
    lvl = level_q;
    chips_d = '0;
    for (int i = int'(BITS) - 1; i >= 0; i--) begin
      b = data_i[i];
      unique case (code_i)
        LC_FM0: begin
          c0 = ~lvl;
          c1 = b ? c0 : ~c0;
        end
        LC_DIFF_MANCHESTER: begin
          c0 = b ? lvl : ~lvl;
          c1 = ~c0;
        end
        default: begin  // LC_MANCHESTER
          c0 = ~b;
          c1 = b;
        end
      endcase
      chips_d[2*i+1] = c0;
      chips_d[2*i]   = c1;
      lvl = c1;
    end
    level_d = lvl;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      level_q <= 1'b0;
      valid_o <= 1'b0;
      chips_o <= '0;
    end else begin
      valid_o <= valid_i;
      if (valid_i) begin
        level_q <= level_d;
        chips_o <= chips_d;
      end
    end
  end

endmodule
