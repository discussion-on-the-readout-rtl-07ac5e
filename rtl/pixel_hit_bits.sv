// pixel_hit_bits: the ten binary hit bits of one pixel, one per front-end.
//
// While counting with the shutter open, bit i is set when front-end i gives
// an unmasked hit, and stays set.  In configuration/readout mode the bits
// form the first segment of the pixel shift chain: h[0] takes the pixel's
// data input and h[9] (the MSB, read out first of the hit bits) feeds the
// ToA counter.  Hits are sampled on the clock, so a discriminator pulse must
// last at least one clock period to be recorded (a choice of this design).
module pixel_hit_bits
  import clictd_pkg::*;
#(
  parameter int unsigned N = NFE
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         count_mode,
  input  logic         shutter,
  input  logic [N-1:0] fe_hit,
  input  logic         shift_en,
  input  logic         shift_in,
  output logic         shift_out,
  output logic [N-1:0] bits
);

  logic [N-1:0] h;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 h <= '0;
    else if (count_mode) begin
      if (shutter)              h <= h | fe_hit;
    end else if (shift_en)      h <= {h[N-2:0], shift_in};
  end

  assign shift_out = h[N-1];
  assign bits      = h;

endmodule
