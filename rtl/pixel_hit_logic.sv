// pixel_hit_logic: combines the discriminator outputs of the front-ends of
// one pixel into the single hit signal of its digital part.
//
// Each discriminator output is gated by its mask bit (AND with the inverted
// mask), the gated outputs are ORed, and a multiplexer selects either that
// OR or the global digital test pulse, depending on the pixel's "enable
// digital test pulse" bit.  This is the structure of the CLICTD pixel
// diagram.  The selected signal is asynchronous to the 100 MHz pixel clock,
// so it passes a two-flop synchroniser (the "Sync" part of the ToA/ToT state
// machines, shared here by both); the gated per-front-end outputs go
// unsynchronised to the hit bits.
//
// Timing: hit_sync follows the selected input two clock edges later.
module pixel_hit_logic
  import clictd_pkg::*;
#(
  parameter int unsigned N = NFE
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] disc,        // discriminator outputs
  input  logic [N-1:0] mask,        // 1: front-end masked
  input  logic         dtp_en,      // select digital test pulse
  input  logic         test_pulse,  // global digital test pulse
  output logic [N-1:0] fe_hit,      // masked discriminator outputs
  output logic         hit_sync     // synchronised pixel hit signal
);

  logic hit_comb;
  logic meta_q;

  always_comb begin
    fe_hit   = disc & ~mask;
    hit_comb = dtp_en ? test_pulse : |fe_hit;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta_q   <= 1'b0;
      hit_sync <= 1'b0;
    end else begin
      meta_q   <= hit_comb;
      hit_sync <= meta_q;
    end
  end

endmodule
