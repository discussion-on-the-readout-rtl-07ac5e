// tot_clk_div: global ToT clock divider.
//
// Produces the ToT clock as a one-cycle enable strobe at the ToA clock rate
// divided by 2**div (div = 0..3, so 100, 50, 25 or 12.5 MHz from 100 MHz).
// The divider is free running; the division ratios are this design's
// choice, the existence of a global divider setting follows CLICTD.
module tot_clk_div (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] div,
  output logic       tot_en
);

  logic [2:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 1'b1;
  end

  always_comb begin
    unique case (div)
      2'd0: tot_en = 1'b1;
      2'd1: tot_en = (cnt[0]   == 1'b0);
      2'd2: tot_en = (cnt[1:0] == 2'b0);
      default: tot_en = (cnt[2:0] == 3'b0);
    endcase
  end

endmodule
