// enc_8b10b: 8b/10b encoder (the Ethernet / Fibre Channel line code).
//
// The byte HGF EDCBA is coded as the 6-bit sub-block abcdei (from EDCBA) and
// the 4-bit sub-block fghj (from HGF), chosen by the running disparity.
// code[9] is bit a, transmitted first; code = {a,b,c,d,e,i,f,g,h,j}.
// The output is combinational from the input and the current running
// disparity; the disparity register advances on the clock edge where en is
// high, i.e. when the symbol is taken.  Control characters (k = 1) are
// supported for K28.x and Kx.7 (x = 23, 27, 29, 30).  Reset starts at
// negative running disparity.
module enc_8b10b (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       k,
  input  logic [7:0] d,
  output logic [9:0] code,
  output logic       rd_pos   // current running disparity is positive
);

  logic [5:0] c6;     // RD- form of the 6b code
  logic [3:0] c4;     // RD- form of the 4b code
  logic       c6_alt, c4_alt;
  logic [5:0] o6;
  logic [3:0] o4;
  logic       rd6, rd_next;
  logic [4:0] x;
  logic [2:0] y;

  assign x = d[4:0];
  assign y = d[7:5];

  always_comb begin
    unique case (x)
      5'd0:  c6 = 6'b100111;  5'd1:  c6 = 6'b011101;
      5'd2:  c6 = 6'b101101;  5'd3:  c6 = 6'b110001;
      5'd4:  c6 = 6'b110101;  5'd5:  c6 = 6'b101001;
      5'd6:  c6 = 6'b011001;  5'd7:  c6 = 6'b111000;
      5'd8:  c6 = 6'b111001;  5'd9:  c6 = 6'b100101;
      5'd10: c6 = 6'b010101;  5'd11: c6 = 6'b110100;
      5'd12: c6 = 6'b001101;  5'd13: c6 = 6'b101100;
      5'd14: c6 = 6'b011100;  5'd15: c6 = 6'b010111;
      5'd16: c6 = 6'b011011;  5'd17: c6 = 6'b100011;
      5'd18: c6 = 6'b010011;  5'd19: c6 = 6'b110010;
      5'd20: c6 = 6'b001011;  5'd21: c6 = 6'b101010;
      5'd22: c6 = 6'b011010;  5'd23: c6 = 6'b111010;
      5'd24: c6 = 6'b110011;  5'd25: c6 = 6'b100110;
      5'd26: c6 = 6'b010110;  5'd27: c6 = 6'b110110;
      5'd28: c6 = 6'b001110;  5'd29: c6 = 6'b101110;
      5'd30: c6 = 6'b011110;  default: c6 = 6'b101011;
    endcase
    if (k && x == 5'd28) c6 = 6'b001111;
    // complemented at positive disparity: unbalanced codes and D.7
    c6_alt = ($countones(c6) != 3) || (c6 == 6'b111000);
    o6     = (rd_pos && c6_alt) ? ~c6 : c6;
    rd6    = ($countones(c6) != 3) ? ~rd_pos : rd_pos;

    if (k) begin
      unique case (y)
        3'd0: c4 = 4'b1011;  3'd1: c4 = 4'b0110;
        3'd2: c4 = 4'b1010;  3'd3: c4 = 4'b1100;
        3'd4: c4 = 4'b1101;  3'd5: c4 = 4'b0101;
        3'd6: c4 = 4'b1001;  default: c4 = 4'b0111;
      endcase
      c4_alt = 1'b1;
    end else begin
      unique case (y)
        3'd0: c4 = 4'b1011;  3'd1: c4 = 4'b1001;
        3'd2: c4 = 4'b0101;  3'd3: c4 = 4'b1100;
        3'd4: c4 = 4'b1101;  3'd5: c4 = 4'b1010;
        3'd6: c4 = 4'b0110;
        default:
          // alternate D.x.A7 avoids a run of five equal bits
          if ((!rd6 && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
              ( rd6 && (x == 5'd11 || x == 5'd13 || x == 5'd14)))
            c4 = 4'b0111;
          else
            c4 = 4'b1110;
      endcase
      c4_alt = ($countones(c4) != 2) || (c4 == 4'b1100);
    end
    o4      = (rd6 && c4_alt) ? ~c4 : c4;
    rd_next = ($countones(c4) != 2) ? ~rd6 : rd6;
    code    = {o6, o4};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  rd_pos <= 1'b0;
    else if (en) rd_pos <= rd_next;
  end

endmodule
