// tb_util_pkg: reference functions shared by the testbenches.
//
// Written independently of the RTL: a generic Fibonacci XNOR LFSR stepped
// from a tap list, the expected 24-bit pixel word, and an 8b/10b encoder
// that takes both running-disparity columns from explicit tables.
package tb_util_pkg;

  // n steps of a width-w XNOR LFSR, shifting towards the MSB; taps are the
  // 1-based polynomial exponents packed in a bit mask (bit t-1 for x^t).
  function automatic logic [31:0] lfsr_steps(input int w, input logic [31:0] taps,
                                             input int n, input logic [31:0] s0 = 0);
    logic [31:0] s = s0;
    for (int i = 0; i < n; i++) begin
      logic fb = 1'b0;
      for (int t = 0; t < w; t++) if (taps[t]) fb ^= s[t];
      s = ((s << 1) | 32'(~fb & 1'b1)) & ((32'd1 << w) - 1);
    end
    return s;
  endfunction

  localparam logic [31:0] TAPS8  = (1 << 7) | (1 << 5) | (1 << 4) | (1 << 3);
  localparam logic [31:0] TAPS5  = (1 << 4) | (1 << 2);
  localparam logic [31:0] TAPS13 = (1 << 12) | (1 << 3) | (1 << 2) | (1 << 0);

  // Pixel word in readout order, MSB first: {hit flag, counter[12:0], hits[9:0]}.
  // mode 0: ToA/ToT counts; otherwise a 13-bit count in toa_n.
  function automatic logic [23:0] pixel_word(input logic hf, input int mode,
                                             input int toa_n, input int tot_n,
                                             input logic [9:0] hits);
    logic [12:0] r;
    if (mode == 0) r = {lfsr_steps(5, TAPS5, tot_n)[4:0], lfsr_steps(8, TAPS8, toa_n)[7:0]};
    else           r = lfsr_steps(13, TAPS13, toa_n)[12:0];
    return {hf, r, hits};
  endfunction

  // 8b/10b: returns {rd_after, code[9:0]} with code = abcdei fghj, a at bit 9.
  function automatic logic [10:0] enc8b10b(input logic rd, input logic k, input logic [7:0] b);
    logic [5:0] m6 [32], p6 [32];
    logic [3:0] m4 [8],  p4 [8], km4 [8], kp4 [8];
    logic [5:0] s6; logic [3:0] s4; logic r6, r;
    int x, y;
    m6 = '{6'b100111,6'b011101,6'b101101,6'b110001,6'b110101,6'b101001,6'b011001,6'b111000,
           6'b111001,6'b100101,6'b010101,6'b110100,6'b001101,6'b101100,6'b011100,6'b010111,
           6'b011011,6'b100011,6'b010011,6'b110010,6'b001011,6'b101010,6'b011010,6'b111010,
           6'b110011,6'b100110,6'b010110,6'b110110,6'b001110,6'b101110,6'b011110,6'b101011};
    p6 = '{6'b011000,6'b100010,6'b010010,6'b110001,6'b001010,6'b101001,6'b011001,6'b000111,
           6'b000110,6'b100101,6'b010101,6'b110100,6'b001101,6'b101100,6'b011100,6'b101000,
           6'b100100,6'b100011,6'b010011,6'b110010,6'b001011,6'b101010,6'b011010,6'b000101,
           6'b001100,6'b100110,6'b010110,6'b001001,6'b001110,6'b010001,6'b100001,6'b010100};
    m4 = '{4'b1011,4'b1001,4'b0101,4'b1100,4'b1101,4'b1010,4'b0110,4'b1110};
    p4 = '{4'b0100,4'b1001,4'b0101,4'b0011,4'b0010,4'b1010,4'b0110,4'b0001};
    km4 = '{4'b1011,4'b0110,4'b1010,4'b1100,4'b1101,4'b0101,4'b1001,4'b0111};
    kp4 = '{4'b0100,4'b1001,4'b0101,4'b0011,4'b0010,4'b1010,4'b0110,4'b1000};
    x = int'(b[4:0]); y = int'(b[7:5]);
    s6 = rd ? p6[x] : m6[x];
    if (k && x == 28) s6 = rd ? 6'b110000 : 6'b001111;
    r6 = ($countones(s6) == 3) ? rd : ($countones(s6) > 3);
    if (k)           s4 = r6 ? kp4[y] : km4[y];
    else if (y == 7 && ((!r6 && (x == 17 || x == 18 || x == 20)) ||
                        ( r6 && (x == 11 || x == 13 || x == 14))))
                     s4 = r6 ? 4'b1000 : 4'b0111;
    else             s4 = r6 ? p4[y] : m4[y];
    r = ($countones(s4) == 2) ? r6 : ($countones(s4) > 2);
    return {r, s6, s4};
  endfunction

endpackage
