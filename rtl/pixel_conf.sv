// pixel_conf: the 51 configuration bits of one pixel, loaded in 3 stages.
//
// The 17 configuration positions of the pixel chain (hit bits 6..9, then the
// 13 counter bits) are copied into stage s while conf[s] is high; when
// conf[s] goes low the stage holds its value.  The 51 bits are, by this
// design's choice, cfg[17*s + k] = chain bit k of stage s, and are decoded
// as five bits per front-end i (cfg[5i+2:5i] threshold DAC, cfg[5i+3] mask,
// cfg[5i+4] analog test pulse enable) plus cfg[50], the digital test pulse
// enable.  The stage latches are modelled as clock-enabled registers (they
// load on each clock while conf[s] is high), which keeps the design fully
// synchronous.
module pixel_conf
  import clictd_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N_STAGES-1:0]   conf,
  input  logic [CONF_STAGE-1:0] chain,   // {counter[12:0], hit_bits[9:6]}
  output fe_cfg_t [NFE-1:0]     fe_cfg,
  output logic                  dtp_en
);

  logic [N_STAGES-1:0][CONF_STAGE-1:0] stage_q;
  logic [CONF_BITS-1:0]                cfg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) stage_q <= '0;
    else
      for (int s = 0; s < N_STAGES; s++)
        if (conf[s]) stage_q[s] <= chain;
  end

  always_comb begin
    cfg = stage_q;
    for (int i = 0; i < NFE; i++) fe_cfg[i] = cfg[FE_CONF*i +: FE_CONF];
    dtp_en = cfg[CONF_BITS-1];
  end

endmodule
