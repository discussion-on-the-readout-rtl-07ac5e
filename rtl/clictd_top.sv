// clictd_top: digital part of the CLICTD monolithic tracker chip.
//
// A matrix of NCOLS x NROWS pixels (each with NFE front-ends) measures, per
// pixel, time of arrival and time over threshold (or a 13-bit ToA, or a
// photon count) during the shutter.  An I2C slow-control link sets the
// global mode, drives the count_readout and conf[2:0] lines, loads the
// configuration word register and steps the matrix shift for
// configuration, and starts the readout.  On readout the columns shift their
// data out, zero-compressed at pixel level, NPAR columns in parallel; the
// end-of-column blocks count pixels and stop their columns, and the bytes
// are 8b/10b coded and sent two bits per clock (DDR) on the serial link.
// The analog front-ends, the SDA tri-state pad and the differential output
// driver are outside this block: discriminator outputs come in on disc,
// threshold and test-pulse settings go out on fe_cfg, SDA is split into
// sda_i / sda_oe and the serial pair leaves on ser_dout.
// One clock, clk: the 100 MHz ToA clock while counting and the readout
// clock while reading out.
module clictd_top
  import clictd_pkg::*;
#(
  parameter int unsigned NCOLS    = 100,
  parameter int unsigned NROWS    = 10,
  parameter int unsigned NPAR     = 2,
  parameter logic [6:0]  I2C_ADDR = 7'h2A
) (
  input  logic                                     clk,
  input  logic                                     rst_n,
  // slow control (I2C)
  input  logic                                     scl_i,
  input  logic                                     sda_i,
  output logic                                     sda_oe,
  // acquisition
  input  logic                                     shutter,
  input  logic                                     test_pulse,
  input  logic [NCOLS-1:0][NROWS-1:0][NFE-1:0]     disc,
  output fe_cfg_t [NCOLS-1:0][NROWS-1:0][NFE-1:0]  fe_cfg,
  // serial data output, {rising-edge bit, falling-edge bit}
  output logic [1:0]                               ser_dout,
  output logic                                     ro_busy,
  output logic                                     ro_stall,  // link back-pressure
  output logic [NCOLS-1:0]                         col_done   // end-of-column flags
);

  global_cfg_t          gcfg;
  logic                 count_mode, cfg_load, cfg_shift, ro_start, ro_done;
  logic [N_STAGES-1:0]  conf;
  logic [7:0]           reg_addr, wr_data, rd_data, cfg_data;
  logic                 wr_stb, tot_en;
  logic [NCOLS-1:0]     cfg_word, col_shift, ro_shift, col_din, col_dout, eoc_done;
  logic                 eoc_clear, sym_k, sym_req;
  logic [7:0]           sym_data;
  logic [9:0]           sym;

  i2c_slave #(.ADDR(I2C_ADDR)) u_i2c (
    .clk, .rst_n, .scl_i, .sda_i, .sda_oe, .reg_addr, .wr_stb, .wr_data, .rd_data);

  slow_ctrl_regs u_regs (
    .clk, .rst_n, .reg_addr, .wr_stb, .wr_data, .rd_data, .ro_busy, .ro_done,
    .gcfg, .count_mode, .conf, .cfg_load, .cfg_data, .cfg_shift, .ro_start);

  cfg_word_reg #(.NCOLS(NCOLS)) u_cfgw (
    .clk, .rst_n, .load(cfg_load), .data(cfg_data), .word(cfg_word));

  tot_clk_div u_totdiv (.clk, .rst_n, .div(gcfg.tot_div), .tot_en);

  // configuration shifts all columns at once; readout shifts single columns
  assign col_shift = ro_shift | {NCOLS{cfg_shift}};
  assign col_din   = cfg_shift ? cfg_word : '0;
  assign col_done  = eoc_done;

  for (genvar c = 0; c < NCOLS; c++) begin : g_col
    column #(.NROWS(NROWS)) u_col (
      .clk, .rst_n, .disc(disc[c]), .count_mode, .shutter, .conf, .gcfg,
      .tot_en, .test_pulse, .shift_en(col_shift[c]), .din(col_din[c]),
      .dout(col_dout[c]), .fe_cfg(fe_cfg[c]), .hit_flag());

    eoc #(.NROWS(NROWS)) u_eoc (
      .clk, .rst_n, .clear(eoc_clear), .compress(gcfg.compress),
      .shift(ro_shift[c]), .bit_in(col_dout[c]), .done(eoc_done[c]),
      .n_pix(), .n_hits(), .n_bits());
  end

  readout_ctrl #(.NCOLS(NCOLS), .NPAR(NPAR)) u_ro (
    .clk, .rst_n, .start(ro_start), .eoc_done, .col_dout, .sym_req,
    .col_shift(ro_shift), .eoc_clear, .sym_k, .sym_data, .busy(ro_busy),
    .done(ro_done), .stall(ro_stall));

  enc_8b10b u_enc (
    .clk, .rst_n, .en(sym_req), .k(sym_k), .d(sym_data), .code(sym), .rd_pos());

  serializer_ddr u_ser (.clk, .rst_n, .sym, .sym_req, .dout(ser_dout));

endmodule
