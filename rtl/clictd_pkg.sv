// clictd_pkg: shared constants, types and helper functions of the CLICTD
// digital pixel matrix and periphery.
//
// The pixel holds 24 shift-register bits that double as configuration and
// measurement storage: 10 front-end hit bits, a 13-bit counter (8-bit ToA +
// 5-bit ToT in nominal mode, one 13-bit counter in long-counter and
// photon-counting modes) and one hit-flag bit.  The counters are linear
// feedback shift registers while counting and plain shift registers during
// configuration and readout.  The feedback polynomials are this design's
// choice (maximal-length XNOR LFSRs, so the all-zero reset state is a valid
// starting state); the sizes follow the CLICTD specification.
package clictd_pkg;

  localparam int unsigned NFE        = 10;  // front-ends (sub-pixels) per pixel
  localparam int unsigned TOA_W      = 8;   // ToA counter bits
  localparam int unsigned TOT_W      = 5;   // ToT counter bits
  localparam int unsigned CNT_W      = TOA_W + TOT_W;  // 13-bit long counter
  localparam int unsigned PIX_BITS   = NFE + CNT_W + 1; // 24 bits per pixel
  localparam int unsigned CONF_STAGE = 17;  // configuration bits per stage
  localparam int unsigned N_STAGES   = 3;   // configuration stages
  localparam int unsigned CONF_BITS  = CONF_STAGE * N_STAGES; // 51
  localparam int unsigned FE_CONF    = 5;   // config bits per front-end
  localparam int unsigned DC_BITS    = NFE - 4; // don't-care hit bits per stage

  // Measurement mode, common to all pixels.
  typedef enum logic [1:0] {
    MODE_NOMINAL = 2'd0,  // 8-bit ToA + 5-bit ToT
    MODE_LONG    = 2'd1,  // 13-bit ToA
    MODE_PHOTON  = 2'd2   // 13-bit photon counter
  } mode_e;

  // Global (column-wide) configuration lines.
  typedef struct packed {
    logic [1:0] tot_div;   // ToT clock = ToA clock / 2**tot_div
    logic       compress;  // 1: pixel-level zero compression
    mode_e      mode;
  } global_cfg_t;

  // Per-front-end configuration, decoded from the 51 pixel bits.
  typedef struct packed {
    logic       tp_en;     // analog test pulse enable
    logic       mask;      // 1: front-end masked
    logic [2:0] thadj;     // local threshold tuning DAC code
  } fe_cfg_t;

  // 8b/10b control characters used on the serial link.
  localparam logic [7:0] K28_5 = 8'hBC;  // idle / comma
  localparam logic [7:0] K27_7 = 8'hFB;  // start of frame
  localparam logic [7:0] K29_7 = 8'hFD;  // end of frame

  // Maximal-length XNOR LFSR steps, shift towards the MSB.
  function automatic logic [TOA_W-1:0] lfsr8_next(input logic [TOA_W-1:0] s);
    return {s[6:0], ~(s[7] ^ s[5] ^ s[4] ^ s[3])};   // x^8+x^6+x^5+x^4+1
  endfunction

  function automatic logic [TOT_W-1:0] lfsr5_next(input logic [TOT_W-1:0] s);
    return {s[3:0], ~(s[4] ^ s[2])};                  // x^5+x^3+1
  endfunction

  function automatic logic [CNT_W-1:0] lfsr13_next(input logic [CNT_W-1:0] s);
    return {s[11:0], ~(s[12] ^ s[3] ^ s[2] ^ s[0])};  // x^13+x^4+x^3+x+1
  endfunction

endpackage
