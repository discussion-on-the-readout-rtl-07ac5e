// pixel_asm: the ToA and ToT state machines of one pixel.
//
// They turn the synchronised hit signal into counting enables for the
// pixel counter.  The pixel has no multi-hit capability, so only the first
// hit of a shutter period is measured:
//   * ToA (nominal and long-counter modes): counting starts on the first
//     rising edge of the hit while the shutter is open and continues on
//     every clock until the shutter closes, so the count is the time from
//     the hit to the end of the shutter in 10 ns steps.
//   * ToT (nominal mode): counts ToT clock strobes (tot_en) while the first
//     hit stays high; it stops for good when the hit falls or the shutter
//     closes.
//   * Photon counting: one step per rising edge of the hit during shutter.
// hf_set marks the first hit so the hit flag can be raised.  While
// count_mode is 0 (configuration/readout) both machines return to IDLE.
// All outputs are combinational from the current state and inputs and act
// on the same clock edge in the counter.
module pixel_asm
  import clictd_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  count_mode,  // 1: counting, 0: configuration/readout
  input  logic  shutter,
  input  logic  hit,         // synchronised hit
  input  logic  tot_en,      // ToT clock strobe (divided ToA clock)
  input  mode_e mode,
  output logic  toa_step,    // advance ToA (or 13-bit) counter
  output logic  tot_step,    // advance ToT counter
  output logic  hf_set       // first hit of this shutter period
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} asm_state_e;

  asm_state_e toa_q, tot_q;
  logic       hit_q;
  logic       rise, first;

  always_comb begin
    rise  = count_mode && shutter && hit && !hit_q;
    first = rise && (toa_q == S_IDLE);
    hf_set = first;
    unique case (mode)
      MODE_PHOTON: toa_step = rise;
      default:     toa_step = count_mode && shutter && (first || toa_q == S_RUN);
    endcase
    tot_step = (mode == MODE_NOMINAL) && count_mode && shutter && hit && tot_en &&
               (first || tot_q == S_RUN);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      toa_q <= S_IDLE;
      tot_q <= S_IDLE;
      hit_q <= 1'b0;
    end else if (!count_mode) begin
      toa_q <= S_IDLE;
      tot_q <= S_IDLE;
      hit_q <= 1'b0;
    end else begin
      hit_q <= hit;
      unique case (toa_q)
        S_IDLE:  if (first) toa_q <= S_RUN;
        S_RUN:   if (!shutter) toa_q <= S_DONE;
        default: ;
      endcase
      unique case (tot_q)
        S_IDLE:  if (first) tot_q <= S_RUN;
        S_RUN:   if (!hit || !shutter) tot_q <= S_DONE;
        default: ;
      endcase
    end
  end

endmodule
