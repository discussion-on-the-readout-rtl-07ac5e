// readout_ctrl: matrix readout sequencer and byte packer.
//
// Columns are read NPAR at a time, in parallel, lowest group first.  Each
// clock in which the byte accumulator has room, every column of the current
// group whose end-of-column block is not yet done is shifted by one bit and
// its output bit is appended to the accumulator (lane 0 = lowest column
// first, in the most significant position); a finished column contributes a
// zero bit and is no longer shifted.  A full byte waits until the serialiser
// asks for a symbol (sym_req) and the column shifting stalls meanwhile, so
// the matrix runs exactly as fast as the link drains it.  When all columns
// of a group are done and the last, zero-padded, byte has gone out, the next
// group starts on a byte boundary.
// Frame on the link: K27.7 (start), data bytes, K29.7 (end); K28.5 is sent
// whenever no other symbol is ready, both between frames and inside a frame
// (a receiver drops it).  A receiver splits each byte into NPAR lanes and
// parses every lane with the pixel format (hit flag, then 23 bits if it is
// set) until it has seen NROWS pixels; any bits after that are padding.
// eoc_clear pulses with start; done pulses when K29.7 is sent.  Readout
// assumes the matrix is in readout mode (count_readout = 0).
module readout_ctrl
  import clictd_pkg::*;
#(
  parameter int unsigned NCOLS = 100,
  parameter int unsigned NPAR  = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [NCOLS-1:0] eoc_done,
  input  logic [NCOLS-1:0] col_dout,
  input  logic             sym_req,
  output logic [NCOLS-1:0] col_shift,
  output logic             eoc_clear,
  output logic             sym_k,
  output logic [7:0]       sym_data,
  output logic             busy,
  output logic             done,
  output logic             stall    // a byte is full and waits for the link
);

  localparam int unsigned NGRP = NCOLS / NPAR;
  localparam int unsigned GW   = (NGRP > 1) ? $clog2(NGRP) : 1;

  typedef enum logic [1:0] {R_IDLE, R_SOF, R_RUN, R_EOF} ro_state_e;

  ro_state_e         state;
  logic [GW-1:0]     grp;
  logic [7:0]        acc;
  logic [3:0]        acc_n;
  logic [NPAR-1:0]   lane_done, lane_bit;
  logic              full, grp_done, fill;

  initial begin
    assert (NCOLS % NPAR == 0) else $error("NCOLS must be a multiple of NPAR");
    assert (8 % NPAR == 0)     else $error("NPAR must divide 8");
  end

  always_comb begin
    for (int j = 0; j < NPAR; j++) begin
      lane_done[j]           = eoc_done[grp*NPAR + j];
      lane_bit[NPAR-1-j]     = !lane_done[j] && col_dout[grp*NPAR + j];
    end
    full     = (acc_n == 4'd8);
    grp_done = &lane_done;
    fill     = (state == R_RUN) && !full && !(grp_done && acc_n == 0);
    col_shift = '0;
    if (fill)
      for (int j = 0; j < NPAR; j++)
        col_shift[grp*NPAR + j] = !lane_done[j];
    stall = (state == R_RUN) && full && !sym_req;

    sym_k = 1'b1; sym_data = K28_5;
    unique case (state)
      R_SOF: sym_data = K27_7;
      R_EOF: sym_data = K29_7;
      R_RUN: if (full) begin sym_k = 1'b0; sym_data = acc; end
      default: ;
    endcase
  end

  assign busy      = (state != R_IDLE);
  assign eoc_clear = start && (state == R_IDLE);
  assign done      = (state == R_EOF) && sym_req;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= R_IDLE; grp <= '0; acc <= '0; acc_n <= '0;
    end else begin
      unique case (state)
        R_IDLE: if (start) begin
          state <= R_SOF; grp <= '0; acc_n <= '0;
        end
        R_SOF: if (sym_req) state <= R_RUN;
        R_RUN: begin
          if (full) begin
            if (sym_req) acc_n <= '0;
          end else if (grp_done && acc_n == 0) begin
            if (grp == GW'(NGRP-1)) state <= R_EOF;
            else                    grp <= grp + 1'b1;
          end else begin
            acc   <= (acc << NPAR) | 8'(lane_bit);
            acc_n <= acc_n + 4'(NPAR);
          end
        end
        R_EOF: if (sym_req) state <= R_IDLE;
        default: state <= R_IDLE;
      endcase
    end
  end

endmodule
