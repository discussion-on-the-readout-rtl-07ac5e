// slow_ctrl_regs: slow-control register file behind the I2C slave.
//
// Register map (8-bit registers, addresses are this design's choice):
//   0x00 GCFG     rw  [1:0] mode (0 nominal, 1 long counter, 2 photon
//                     counting), [2] compression enable, [4:3] ToT divider
//   0x01 MCTRL    rw  [0] count_readout (1 counting, 0 config/readout),
//                     [3:1] conf[2:0] configuration stage latch enables
//   0x02 CFGDATA  w   each byte written is pushed into the column
//                     configuration word register
//   0x03 CFGSHIFT w   each write shifts the whole matrix by one bit, with the
//                     configuration word as column data inputs
//   0x04 ROCTRL   w   bit 0 = 1 starts a readout of the matrix
//   0x05 STATUS   r   [0] readout busy, [1] readout finished since start
// Other addresses read as zero.  Pulses last one clock.
module slow_ctrl_regs
  import clictd_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [7:0]       reg_addr,
  input  logic             wr_stb,
  input  logic [7:0]       wr_data,
  output logic [7:0]       rd_data,
  input  logic             ro_busy,
  input  logic             ro_done,
  output global_cfg_t      gcfg,
  output logic             count_mode,
  output logic [N_STAGES-1:0] conf,
  output logic             cfg_load,
  output logic [7:0]       cfg_data,
  output logic             cfg_shift,
  output logic             ro_start
);

  localparam logic [7:0] A_GCFG = 8'h00, A_MCTRL = 8'h01, A_CFGDATA = 8'h02,
                         A_CFGSHIFT = 8'h03, A_ROCTRL = 8'h04, A_STATUS = 8'h05;

  logic ro_fin;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gcfg <= '{tot_div: 2'd0, compress: 1'b1, mode: MODE_NOMINAL};
      count_mode <= 1'b0; conf <= '0;
      cfg_load <= 1'b0; cfg_data <= '0; cfg_shift <= 1'b0; ro_start <= 1'b0;
      ro_fin <= 1'b0;
    end else begin
      cfg_load <= 1'b0; cfg_shift <= 1'b0; ro_start <= 1'b0;
      if (ro_done) ro_fin <= 1'b1;
      if (wr_stb) begin
        unique case (reg_addr)
          A_GCFG:     gcfg <= '{tot_div: wr_data[4:3], compress: wr_data[2],
                                mode: mode_e'(wr_data[1:0])};
          A_MCTRL:    begin count_mode <= wr_data[0]; conf <= wr_data[3:1]; end
          A_CFGDATA:  begin cfg_load <= 1'b1; cfg_data <= wr_data; end
          A_CFGSHIFT: cfg_shift <= 1'b1;
          A_ROCTRL:   if (wr_data[0]) begin ro_start <= 1'b1; ro_fin <= 1'b0; end
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (reg_addr)
      A_GCFG:   rd_data = {3'b0, gcfg.tot_div, gcfg.compress, gcfg.mode};
      A_MCTRL:  rd_data = {4'b0, conf, count_mode};
      A_STATUS: rd_data = {6'b0, ro_fin, ro_busy};
      default:  rd_data = 8'h00;
    endcase
  end

endmodule
