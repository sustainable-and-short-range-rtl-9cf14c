// tb_ref_pkg: reference models used by the testbenches.
//
// These are written from the textbook definitions, independently of the
// RTL: the (12,8) Hamming code is given by its explicit parity equations
// (P1 = D3^D5^D7^D9^D11, P2 = D3^D6^D7^D10^D11, P4 = D5^D6^D7^D12,
// P8 = D9^D10^D11^D12) and a fixed table of data positions; the line codes
// are modelled by their transitions (where the line level inverts) rather
// than by chip tables.
package tb_ref_pkg;

  // Data positions of the (12,8) code, most significant data bit first.
  localparam int DPOS8 [8] = '{3, 5, 6, 7, 9, 10, 11, 12};
  // Data positions of the (7,4) code.
  localparam int DPOS4 [4] = '{3, 5, 6, 7};

  // Code word from a string of '0'/'1' listing positions 1..12 left to right.
  function automatic logic [12:1] cw_from_str(input string s);
    logic [12:1] cw;
    for (int i = 1; i <= 12; i++) cw[i] = (s[i-1] == "1");
    return cw;
  endfunction

  function automatic logic [3:0] parity8(input logic [7:0] d);
    logic [12:1] c;
    c = '0;
    for (int k = 0; k < 8; k++) c[DPOS8[k]] = d[7-k];
    return {c[9] ^ c[10] ^ c[11] ^ c[12],            // P8
            c[5] ^ c[6] ^ c[7] ^ c[12],              // P4
            c[3] ^ c[6] ^ c[7] ^ c[10] ^ c[11],      // P2
            c[3] ^ c[5] ^ c[7] ^ c[9] ^ c[11]};      // P1
  endfunction

  function automatic logic [2:0] parity4(input logic [3:0] d);
    logic [7:1] c;
    c = '0;
    for (int k = 0; k < 4; k++) c[DPOS4[k]] = d[3-k];
    return {c[5] ^ c[6] ^ c[7], c[3] ^ c[6] ^ c[7], c[3] ^ c[5] ^ c[7]};
  endfunction

  function automatic logic [12:1] encode8(input logic [7:0] d);
    logic [12:1] c;
    logic [3:0]  p;
    c = '0;
    for (int k = 0; k < 8; k++) c[DPOS8[k]] = d[7-k];
    p = parity8(d);
    c[1] = p[0]; c[2] = p[1]; c[4] = p[2]; c[8] = p[3];
    return c;
  endfunction

  function automatic logic [7:1] encode4(input logic [3:0] d);
    logic [7:1] c;
    logic [2:0] p;
    c = '0;
    for (int k = 0; k < 4; k++) c[DPOS4[k]] = d[3-k];
    p = parity4(d);
    c[1] = p[0]; c[2] = p[1]; c[4] = p[2];
    return c;
  endfunction

  function automatic logic [7:0] extract8(input logic [12:1] c);
    logic [7:0] d;
    for (int k = 0; k < 8; k++) d[7-k] = c[DPOS8[k]];
    return d;
  endfunction

  // Line code of one bit as two chips {first, second}, given and updating
  // the line level. code: 0 Manchester, 1 FM0, 2 differential Manchester.
  function automatic logic [1:0] line_bit(input int code, input logic b,
                                          inout logic level);
    logic first, second;
    bit   start_tr, mid_tr;
    case (code)
      1: begin start_tr = 1; mid_tr = !b; end        // FM0
      2: begin start_tr = !b; mid_tr = 1; end        // differential Manchester
      default: begin start_tr = 0; mid_tr = 1; end   // Manchester (level ignored)
    endcase
    if (code == 0) begin
      first  = b ? 1'b0 : 1'b1;                     // 1: low then high
      second = !first;
    end else begin
      first  = start_tr ? !level : level;
      second = mid_tr ? !first : first;
    end
    level = second;
    return {first, second};
  endfunction

  // A word of n data bits (MSB first) into 2n chips, MSB pair first.
  function automatic logic [15:0] line_word(input int code, input logic [7:0] d,
                                            input int n, inout logic level);
    logic [15:0] chips;
    chips = '0;
    for (int i = n - 1; i >= 0; i--) chips[2*i +: 2] = line_bit(code, d[i], level);
    return chips;
  endfunction

endpackage
