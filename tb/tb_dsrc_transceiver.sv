// tb_dsrc_transceiver: end-to-end test of the transceiver at its default
// size (4 data bits per word, 8 chips, (12,8) Hamming code).
//
// The transmit output is looped back to the receive input through a model
// of the ASK link that can flip code word bits. Every cycle the testbench
// may send a word (or leave the cycle idle) and chooses, per word, a clean
// channel, one flipped position, or two flipped positions. In idle slots it
// may also inject a crafted code word whose chips break the line code.
//
// Checks:
//   * tx_codeword_o, exactly 2 cycles after tx_valid_i, equals the reference
//     Hamming code word of the reference line-coded chips;
//   * rx outputs, exactly 3 cycles after rx_valid_i, equal a reference
//     receiver (explicit checker equations, then transition-based line
//     decoding) in data, violations, syndrome and flags;
//   * for every word with at most one flipped bit the received data equals
//     the data that was sent.
// Mechanisms counted, each of which must occur: every line code, clean word,
// single-bit correction at each of the 12 positions, uncorrectable double
// error, double error miscorrected as a single one, line code violation,
// idle cycle, change of line code without reset.
module tb_dsrc_transceiver;
  import dsrc_pkg::*;
  import tb_ref_pkg::*;

  localparam int NCYC = 12000;

  logic        clk = 0, rst_n;
  line_code_e  code;
  logic        tx_valid_i, tx_valid_o, rx_valid_i, rx_valid_o;
  logic [3:0]  tx_data_i, rx_data_o, rx_violation_o;
  logic [12:1] tx_codeword_o, rx_codeword_i;
  logic [3:0]  rx_syndrome_o;
  logic        rx_corrected_o, rx_uncorrectable_o;

  dsrc_transceiver dut (
    .clk, .rst_n, .code_i(code),
    .tx_valid_i, .tx_data_i, .tx_valid_o, .tx_codeword_o,
    .rx_valid_i, .rx_codeword_i, .rx_valid_o, .rx_data_o, .rx_violation_o,
    .rx_syndrome_o, .rx_corrected_o, .rx_uncorrectable_o
  );

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  int n_code[3], n_clean, n_uncorr, n_miscorr, n_viol, n_idle, n_switch;
  int n_fix_pos[13];

  // Per-cycle history, indexed by the cycle in which the input was applied.
  logic        txv_h[NCYC];
  logic [3:0]  txd_h[NCYC];
  logic [12:1] txcw_h[NCYC];
  logic        rxv_h[NCYC];
  logic [3:0]  rxd_exp[NCYC], rxv_exp[NCYC], rxs_exp[NCYC];
  logic        rxc_exp[NCYC], rxu_exp[NCYC];
  logic [3:0]  rx_sent[NCYC];   // data originally sent, for 0/1-error words
  logic        rx_sent_ok[NCYC];

  logic tx_level, rx_level;     // reference line levels

  initial begin
    #(10 * (NCYC + 200));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Reference receiver: Hamming decoding from the checker equations, then
  // line decoding by transitions.
  task automatic ref_rx(input logic [12:1] cw, output logic [3:0] d,
                        output logic [3:0] v, output logic [3:0] s,
                        output logic corr, output logic unc);
    logic [12:1] c;
    logic [7:0]  chips;
    logic        f, sc;
    c = cw;
    s = {c[8] ^ c[9] ^ c[10] ^ c[11] ^ c[12],
         c[4] ^ c[5] ^ c[6] ^ c[7] ^ c[12],
         c[2] ^ c[3] ^ c[6] ^ c[7] ^ c[10] ^ c[11],
         c[1] ^ c[3] ^ c[5] ^ c[7] ^ c[9] ^ c[11]};
    unc  = (s > 12);
    corr = (s != 0) && !unc;
    if (corr) c[s] = !c[s];
    chips = extract8(c);
    for (int i = 3; i >= 0; i--) begin
      f = chips[2*i+1]; sc = chips[2*i];
      case (int'(code))
        1: begin d[i] = (f == sc); v[i] = (f == rx_level); end  // FM0
        2: begin d[i] = (f == rx_level); v[i] = (f == sc); end  // diff. Manchester
        default: begin d[i] = sc; v[i] = (f == sc); end         // Manchester
      endcase
      rx_level = sc;
    end
  endtask

  initial begin
    int t, phase;
    logic [12:1] mask, cw;
    logic [3:0] d, v, s;
    logic corr, unc;
    int nerr;

    code = LC_MANCHESTER;
    rst_n = 0; tx_valid_i = 0; tx_data_i = '0; rx_valid_i = 0; rx_codeword_i = '0;
    for (int i = 0; i < NCYC; i++) begin txv_h[i] = 0; rxv_h[i] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    tx_level = 0; rx_level = 0;

    for (t = 0; t < NCYC - 10; t++) begin
      @(posedge clk); #1;
      // ---- check outputs of earlier cycles ----
      if (t >= 2) begin
        check(tx_valid_o == txv_h[t-2], "tx valid latency 2");
        if (txv_h[t-2]) check(tx_codeword_o == txcw_h[t-2],
          $sformatf("tx code word %b expected %b", tx_codeword_o, txcw_h[t-2]));
      end
      if (t >= 3) begin
        check(rx_valid_o == rxv_h[t-3], "rx valid latency 3");
        if (rxv_h[t-3]) begin
          check(rx_data_o == rxd_exp[t-3] && rx_violation_o == rxv_exp[t-3] &&
                rx_syndrome_o == rxs_exp[t-3] && rx_corrected_o == rxc_exp[t-3] &&
                rx_uncorrectable_o == rxu_exp[t-3],
                $sformatf("rx data %b viol %b syn %0d c%0d u%0d, expected %b %b %0d c%0d u%0d",
                  rx_data_o, rx_violation_o, rx_syndrome_o, rx_corrected_o, rx_uncorrectable_o,
                  rxd_exp[t-3], rxv_exp[t-3], rxs_exp[t-3], rxc_exp[t-3], rxu_exp[t-3]));
          if (rx_sent_ok[t-3]) check(rx_data_o == rx_sent[t-3], "data recovered end to end");
          if (rx_violation_o != 0) n_viol++;
        end
      end

      // ---- line code: one phase per code; nothing is sent in the last
      //      10 cycles of a phase, so the pipeline is empty at the change ----
      phase = t / 3000;
      if (t % 3000 == 0 && t != 0) begin
        code = line_code_e'(phase % 3);
        n_switch++;
      end

      // ---- receive side: loop back what the transmitter produced ----
      rx_valid_i = 0;
      if (tx_valid_o) begin
        nerr = 0;
        mask = '0;
        case ($urandom_range(9))
          0, 1, 2: begin
            int a;
            a = 1 + int'($urandom_range(11));
            mask[a] = 1; nerr = 1;
          end
          3: begin
            int a, b;
            // Two flips, none on position 12 and no correction of 12, so
            // the last chip (the line level) survives.
            do begin
              a = 1 + int'($urandom_range(10));
              b = 1 + int'($urandom_range(10));
            end while (a == b || (a ^ b) == 12);
            mask[a] = 1; mask[b] = 1; nerr = 2;
          end
          default: ;
        endcase
        rx_valid_i = 1;
        rx_codeword_i = tx_codeword_o ^ mask;
        ref_rx(rx_codeword_i, d, v, s, corr, unc);
        rxv_h[t] = 1; rxd_exp[t] = d; rxv_exp[t] = v; rxs_exp[t] = s;
        rxc_exp[t] = corr; rxu_exp[t] = unc;
        rx_sent[t] = txd_h[t-2]; rx_sent_ok[t] = (nerr <= 1);
        if (nerr == 0) n_clean++;
        if (nerr == 1) n_fix_pos[s]++;
        if (nerr == 2 && unc) n_uncorr++;
        if (nerr == 2 && !unc) n_miscorr++;
      end else if (t >= 2 && (t % 3000) < 2990 && $urandom_range(3) == 0) begin
        // Idle slot: inject a word whose chips break the line code in one
        // bit, keeping the final line level unchanged.
        logic [15:0] w;
        logic        lv, l0;
        int          b;
        b = 1 + int'($urandom_range(2));
        l0 = rx_level;
        do begin
          lv = l0;
          w = line_word(int'(code), {4'b0, 4'($urandom)}, 4, lv);
        end while (w[0] != l0);
        if (code == LC_FM0) w[2*b+1] = (b == 3) ? l0 : w[2*b+2];
        else                w[2*b]   = w[2*b+1];
        rx_valid_i = 1;
        rx_codeword_i = encode8(w[7:0]);
        ref_rx(rx_codeword_i, d, v, s, corr, unc);
        // The corrupted bit's chip 2b feeds bit b-1's checks, so the final
        // level is unaffected.
        rx_level = l0;
        rxv_h[t] = 1; rxd_exp[t] = d; rxv_exp[t] = v; rxs_exp[t] = s;
        rxc_exp[t] = corr; rxu_exp[t] = unc;
        rx_sent_ok[t] = 0;
      end

      // ---- transmit side ----
      if ((t % 3000) >= 2990 || $urandom_range(4) == 0) begin
        tx_valid_i = 0;
        n_idle++;
      end else begin
        tx_valid_i = 1;
        tx_data_i = 4'($urandom);
        txv_h[t] = 1;
        txd_h[t] = tx_data_i;
        txcw_h[t] = encode8(line_word(int'(code), {4'b0, tx_data_i}, 4, tx_level)[7:0]);
        n_code[int'(code)]++;
      end
    end

    // ---- mechanism coverage ----
    for (int c = 0; c < 3; c++) check(n_code[c] > 0, $sformatf("line code %0d used", c));
    for (int p = 1; p <= 12; p++) check(n_fix_pos[p] > 0, $sformatf("correction at %0d", p));
    check(n_clean > 0, "clean word");
    check(n_uncorr > 0, "uncorrectable double error");
    check(n_miscorr > 0, "miscorrected double error");
    check(n_viol > 0, "line code violation");
    check(n_idle > 0, "idle cycle");
    check(n_switch > 0, "line code change");
    $display("words per code %0d/%0d/%0d clean %0d uncorrectable %0d miscorrected %0d violations %0d idle %0d switches %0d",
             n_code[0], n_code[1], n_code[2], n_clean, n_uncorr, n_miscorr, n_viol, n_idle, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
