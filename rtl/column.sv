// column: NROWS pixels chained into one shift register.
//
// Data enter at the top pixel (row NROWS-1) and leave from the bottom pixel
// (row 0), so during readout the lowest row comes out first and the pixels
// above follow, while the bits entering at the top (zeros during readout)
// clear the chain.  All other signals are common to the column.
module column
  import clictd_pkg::*;
#(
  parameter int unsigned NROWS = 10
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [NROWS-1:0][NFE-1:0]    disc,
  input  logic                         count_mode,
  input  logic                         shutter,
  input  logic [N_STAGES-1:0]          conf,
  input  global_cfg_t                  gcfg,
  input  logic                         tot_en,
  input  logic                         test_pulse,
  input  logic                         shift_en,
  input  logic                         din,
  output logic                         dout,
  output fe_cfg_t [NROWS-1:0][NFE-1:0] fe_cfg,
  output logic [NROWS-1:0]             hit_flag
);

  logic [NROWS:0] link;  // link[r] is the data input of row r

  assign link[NROWS] = din;
  assign dout        = link[0];

  for (genvar r = 0; r < NROWS; r++) begin : g_row
    pixel u_pix (
      .clk, .rst_n, .disc(disc[r]), .count_mode, .shutter, .conf, .gcfg,
      .tot_en, .test_pulse, .shift_en, .din(link[r+1]), .dout(link[r]),
      .fe_cfg(fe_cfg[r]), .hit_flag(hit_flag[r]));
  end

endmodule
