// pixel_counter: the ToA and ToT counters of one pixel, 13 bits in all.
//
// The register r[12:0] is a segment of the pixel shift chain: r[7:0] is the
// 8-bit ToA counter (r[0] nearest the data input) and r[12:8] the 5-bit ToT
// counter, whose MSB r[12] is the last bit before the hit flag.  With
// count_mode = 1 the bits form LFSR counters: in nominal mode two separate
// LFSRs (8 and 5 bits, stepped by toa_step and tot_step), in long-counter
// and photon-counting modes one 13-bit LFSR stepped by toa_step.  With
// count_mode = 0 the register is a plain shift register that moves one
// place towards r[12] on each shift_en, taking shift_in at r[0]; this is
// how data are read out and configuration bits shifted in.
// Timing: every change happens on the rising clock edge; shift_out = r[12].
module pixel_counter
  import clictd_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             count_mode,
  input  mode_e            mode,
  input  logic             toa_step,
  input  logic             tot_step,
  input  logic             shift_en,
  input  logic             shift_in,
  output logic             shift_out,
  output logic [CNT_W-1:0] value
);

  logic [CNT_W-1:0] r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r <= '0;
    end else if (!count_mode) begin
      if (shift_en) r <= {r[CNT_W-2:0], shift_in};
    end else if (mode == MODE_NOMINAL) begin
      if (toa_step) r[TOA_W-1:0]     <= lfsr8_next(r[TOA_W-1:0]);
      if (tot_step) r[CNT_W-1:TOA_W] <= lfsr5_next(r[CNT_W-1:TOA_W]);
    end else if (toa_step) begin
      r <= lfsr13_next(r);
    end
  end

  assign shift_out = r[CNT_W-1];
  assign value     = r;

endmodule
