// pixel: the digital part of one CLICTD pixel (ten front-ends).
//
// Masked discriminator outputs set the hit bits and, ORed (or replaced by
// the digital test pulse), drive the ToA/ToT state machines, which step the
// 13-bit counter and raise the hit flag.  In configuration/readout mode
// (count_mode = 0) the 24 bits form one shift chain:
//   din -> hit bits 0..9 -> ToA 0..7 -> ToT 0..4 -> mux -> HF D-FF -> dout
// so the pixel is read out as hit flag, ToT (MSB first), ToA (MSB first),
// hit bits (MSB first).  With compression on and no hit the multiplexer
// bypasses the chain and the pixel contributes a single zero bit.  Each
// configuration stage uses 17 of the 24 chain positions; the 6 low hit bits
// and the hit flag are don't-care during configuration.
// Threshold DAC codes and analog test pulse enables go out to the analog
// front-ends.  One shift per clock with shift_en; counting on every clock.
module pixel
  import clictd_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NFE-1:0]    disc,
  input  logic              count_mode,
  input  logic              shutter,
  input  logic [N_STAGES-1:0] conf,
  input  global_cfg_t       gcfg,
  input  logic              tot_en,
  input  logic              test_pulse,
  input  logic              shift_en,
  input  logic              din,
  output logic              dout,
  output fe_cfg_t [NFE-1:0] fe_cfg,
  output logic              hit_flag
);

  logic [NFE-1:0]   fe_hit, hbits, mask;
  logic [CNT_W-1:0] cnt;
  logic             hit_sync, dtp_en;
  logic             toa_step, tot_step, hf_set;
  logic             use_chain, chain_shift;
  logic             hb_out, cnt_out;

  always_comb
    for (int i = 0; i < NFE; i++) mask[i] = fe_cfg[i].mask;

  assign chain_shift = shift_en && use_chain;

  pixel_hit_logic u_hit (
    .clk, .rst_n, .disc, .mask, .dtp_en, .test_pulse, .fe_hit, .hit_sync);

  pixel_asm u_asm (
    .clk, .rst_n, .count_mode, .shutter, .hit(hit_sync), .tot_en,
    .mode(gcfg.mode), .toa_step, .tot_step, .hf_set);

  pixel_hit_bits u_hb (
    .clk, .rst_n, .count_mode, .shutter, .fe_hit, .shift_en(chain_shift),
    .shift_in(din), .shift_out(hb_out), .bits(hbits));

  pixel_counter u_cnt (
    .clk, .rst_n, .count_mode, .mode(gcfg.mode), .toa_step, .tot_step,
    .shift_en(chain_shift), .shift_in(hb_out), .shift_out(cnt_out), .value(cnt));

  pixel_hit_flag u_hf (
    .clk, .rst_n, .count_mode, .compress(gcfg.compress), .hf_set, .shift_en,
    .bypass_in(din), .chain_in(cnt_out), .use_chain, .dout, .hit_flag);

  pixel_conf u_conf (
    .clk, .rst_n, .conf, .chain({cnt, hbits[NFE-1:DC_BITS]}), .fe_cfg, .dtp_en);

endmodule
