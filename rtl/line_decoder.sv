// line_decoder: FM0 / Manchester / differential Manchester line decoder.
//
// The inverse of line_encoder. Each pair of chips (first half in
// chips_i[2b+1], second half in chips_i[2b]) gives data bit b, the most
// significant pair being the earliest in time. With L the level at the end
// of the previous bit:
//   Manchester:              bit = second half;       violation if both halves equal.
//   FM0:                     bit = (first == second); violation if first == L
//                            (the transition at the start of the bit is missing).
//   Differential Manchester: bit = (first == L);      violation if both halves equal
//                            (the mid-bit transition is missing).
// L is kept across words and is 0 after reset, matching line_encoder. A
// violation marks the bit as not trustworthy; the bit value is still given.
// The code conventions are those of line_encoder and are this design's
// choice; violation checking is this design's addition.
//
// Interface: clk, rst_n (active-low, synchronous), code_i, valid_i with
// chips_i[2*BITS-1:0]; valid_o with data_o[BITS-1:0] and violation_o[BITS-1:0]
// (one flag per bit). Timing: one word per cycle, registered, one cycle of
// latency.
module line_decoder #(
  parameter int unsigned BITS = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  dsrc_pkg::line_code_e  code_i,
  input  logic                  valid_i,
  input  logic [2*BITS-1:0]     chips_i,
  output logic                  valid_o,
  output logic [BITS-1:0]       data_o,
  output logic [BITS-1:0]       violation_o
);
  import dsrc_pkg::*;

  logic              level_q;
  logic              level_d;
  logic [BITS-1:0]   data_d;
  logic [BITS-1:0]   viol_d;

  always_comb begin
    logic lvl, c0, c1;
    lvl = level_q;
    data_d = '0;
    viol_d = '0;
    for (int i = int'(BITS) - 1; i >= 0; i--) begin
      c0 = chips_i[2*i+1];
      c1 = chips_i[2*i];
      unique case (code_i)
        LC_FM0: begin
          data_d[i] = (c0 == c1);
          viol_d[i] = (c0 == lvl);
        end
        LC_DIFF_MANCHESTER: begin
          data_d[i] = (c0 == lvl);
          viol_d[i] = (c0 == c1);
        end
        default: begin  // LC_MANCHESTER
          data_d[i] = c1;
          viol_d[i] = (c0 == c1);
        end
      endcase
      lvl = c1;
    end
    level_d = lvl;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      level_q     <= 1'b0;
      valid_o     <= 1'b0;
      data_o      <= '0;
      violation_o <= '0;
    end else begin
      valid_o <= valid_i;
      if (valid_i) begin
        level_q     <= level_d;
        data_o      <= data_d;
        violation_o <= viol_d;
      end
    end
  end

endmodule
