// pixel_hit_flag: hit-flag flip-flop, hit-flag latch and compression
// multiplexer of one pixel.
//
// The hit-flag D flip-flop (HF D-FF) is the last bit of the pixel chain and
// drives the pixel's data output.  It is set by the first hit during the
// shutter.  The hit-flag latch follows it while counting and holds its value
// during configuration/readout.  It steers the multiplexer in front of the
// D flip-flop: with compression on and no hit, the multiplexer passes the
// pixel's data input straight to the D flip-flop, so the pixel adds one bit
// (its zero flag) to the column stream; otherwise it passes the end of the
// 23-bit chain, and the pixel adds 24 bits.  use_chain tells the rest of the
// pixel whether its 23-bit chain shifts (a bypassed pixel keeps its chain
// still, i.e. its clock stays gated).  The latch is modelled as a register
// loaded on every clock while count_mode is 1.
module pixel_hit_flag (
  input  logic clk,
  input  logic rst_n,
  input  logic count_mode,
  input  logic compress,
  input  logic hf_set,
  input  logic shift_en,
  input  logic bypass_in,  // pixel data input
  input  logic chain_in,   // end of the 23-bit chain (ToT MSB)
  output logic use_chain,
  output logic dout,       // HF D-FF: pixel data output
  output logic hit_flag    // latched hit flag
);

  logic hf_q, hf_l;

  assign use_chain = !compress || hf_l;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hf_q <= 1'b0;
      hf_l <= 1'b0;
    end else if (count_mode) begin
      if (hf_set) hf_q <= 1'b1;
      hf_l <= hf_q | hf_set;
    end else if (shift_en) begin
      hf_q <= use_chain ? chain_in : bypass_in;
    end
  end

  assign dout     = hf_q;
  assign hit_flag = hf_l;

endmodule
