// clictd_full_tb: one complete operation of the chip at its default size
// (100 columns x 10 rows, two columns read in parallel).
//
// Over I2C it selects nominal mode with compression, opens the counting
// phase, applies a shutter during which about 3 % of the pixels receive a
// hit of random arrival time, length and front-end pattern, switches to
// readout and starts it.  The serial stream is decoded and every one of the
// 1000 pixel words is compared with the prediction; a link stall and the
// compressed bypass of empty pixels must both occur.
module clictd_full_tb;
  import clictd_pkg::*;
  import tb_util_pkg::*;
  localparam int NC = 100, NR = 10, NP = 2;   // the chip's default size

  logic clk = 0, rst_n = 0;
  logic scl_m = 1, sda_m = 1, sda_oe, shutter = 0, test_pulse = 0, ro_busy, ro_stall;
  logic [NC-1:0][NR-1:0][NFE-1:0] disc;
  fe_cfg_t [NC-1:0][NR-1:0][NFE-1:0] fe_cfg;
  logic [1:0] ser_dout;
  logic [NC-1:0] col_done;
  wire sda_i = sda_m & ~sda_oe;

  clictd_top dut (
    .clk, .rst_n, .scl_i(scl_m), .sda_i, .sda_oe, .shutter, .test_pulse, .disc,
    .fe_cfg, .ser_dout, .ro_busy, .ro_stall, .col_done);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall = 0, n_bypass = 0, n_hitpix = 0, n_masked = 0, n_dtp = 0, n_fill = 0;
  int n_uncomp = 0, n_photon = 0, n_status = 0;
  logic serial [$];

  always @(posedge clk) if (rst_n) begin
    serial.push_back(ser_dout[1]); serial.push_back(ser_dout[0]);
    n_stall += ro_stall;
  end

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  // ---------------- I2C master ----------------
  localparam int Q = 100;
  task automatic i2c_start(); sda_m = 1; #Q; scl_m = 1; #Q; sda_m = 0; #Q; scl_m = 0; #Q; endtask
  task automatic i2c_stop();  sda_m = 0; #Q; scl_m = 1; #Q; sda_m = 1; #Q; endtask
  task automatic wbit(input logic b); sda_m = b; #Q; scl_m = 1; #(2*Q); scl_m = 0; #Q; endtask
  task automatic rbit(output logic b); sda_m = 1; #Q; scl_m = 1; #Q; b = sda_i; #Q; scl_m = 0; #Q; endtask
  task automatic wbyte(input logic [7:0] v);
    logic b;
    for (int i = 7; i >= 0; i--) wbit(v[i]);
    rbit(b); chk("i2c ack", b, 0);
  endtask
  task automatic wreg(input logic [7:0] a, input logic [7:0] v);
    i2c_start(); wbyte({7'h2A, 1'b0}); wbyte(a); wbyte(v); i2c_stop();
  endtask
  task automatic rreg(input logic [7:0] a, output logic [7:0] v);
    i2c_start(); wbyte({7'h2A, 1'b0}); wbyte(a);
    i2c_start(); wbyte({7'h2A, 1'b1});
    for (int i = 7; i >= 0; i--) rbit(v[i]);
    wbit(1'b1); i2c_stop();
  endtask

  // ---------------- link decoding ----------------
  logic [8:0] dec [logic [9:0]];
  initial begin
    for (int rd = 0; rd < 2; rd++) begin
      for (int b = 0; b < 256; b++) dec[enc8b10b(rd[0], 0, 8'(b))[9:0]] = {1'b0, 8'(b)};
      dec[enc8b10b(rd[0], 1, K28_5)[9:0]] = {1'b1, K28_5};
      dec[enc8b10b(rd[0], 1, K27_7)[9:0]] = {1'b1, K27_7};
      dec[enc8b10b(rd[0], 1, K29_7)[9:0]] = {1'b1, K29_7};
    end
  end

  // run a readout and return the pixel words found; hit[c][r] = 24-bit pixel
  task automatic readout(input logic compress, output logic [23:0] words [NC][NR],
                         output logic flag [NC][NR]);
    int off, p0;
    logic [8:0] syms [$];
    logic [7:0] bytes [$];
    logic [7:0] st;
    int bi;
    serial = {};
    wreg(8'h04, 8'h01);
    // a short frame may already be over when the I2C stop ends
    repeat (10) @(posedge clk);
    wait (!ro_busy);
    repeat (20) @(posedge clk);
    rreg(8'h05, st);
    chk("status finished", st, 8'h02); n_status++;
    // align on the first comma
    off = -1;
    for (int i = 0; i + 10 <= serial.size() && off < 0; i++) begin
      logic [9:0] w;
      for (int k = 0; k < 10; k++) w[9-k] = serial[i+k];
      if (w == 10'b0011111010 || w == 10'b1100000101) off = i;
    end
    chk("comma found", off >= 0, 1);
    for (int i = off; i + 10 <= serial.size(); i += 10) begin
      logic [9:0] w;
      for (int k = 0; k < 10; k++) w[9-k] = serial[i+k];
      if (!dec.exists(w)) begin failures++; $display("bad code %b", w); end
      else syms.push_back(dec[w]);
    end
    p0 = -1;
    foreach (syms[i]) if (syms[i] == {1'b1, K27_7} && p0 < 0) p0 = i;
    chk("start of frame", p0 >= 0, 1);
    for (int i = p0 + 1; i < syms.size() && syms[i] != {1'b1, K29_7}; i++) begin
      if (syms[i] == {1'b1, K28_5}) n_fill++;
      else bytes.push_back(syms[i][7:0]);
    end
    // parse lanes group by group
    bi = 0;
    for (int g = 0; g < NC/NP; g++) begin
      int npix [NP], nbit [NP];
      logic [23:0] cur [NP];
      foreach (npix[j]) begin npix[j] = 0; nbit[j] = 0; cur[j] = 0; end
      while (!(npix[0] == NR && npix[1] == NR) && bi < bytes.size()) begin
        for (int s = 0; s < 4; s++)
          for (int j = 0; j < NP; j++) begin
            logic b = bytes[bi][7 - 2*s - j];
            if (npix[j] < NR) begin
              cur[j] = {cur[j][22:0], b}; nbit[j]++;
              if ((nbit[j] == 1 && compress && !b) || nbit[j] == 24) begin
                words[g*NP+j][npix[j]] = (nbit[j] == 1) ? 24'h0 : cur[j];
                flag[g*NP+j][npix[j]] = (nbit[j] != 1);
                if (nbit[j] == 1) n_bypass++;
                npix[j]++; nbit[j] = 0; cur[j] = 0;
              end
            end
          end
        bi++;
      end
      chk($sformatf("group %0d complete", g), npix[0] + npix[1], 2*NR);
    end
    chk("all bytes used", bi, bytes.size());
    if (!compress) n_uncomp++;
  endtask

  initial begin
    #20ms;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [23:0] words [NC][NR];
    logic flag [NC][NR];
    logic [23:0] expw [NC][NR];
    int t0 [NC][NR], len [NC][NR];
    logic [NFE-1:0] pat [NC][NR];
    int nhit = 0;
    disc = '0;
    repeat (3) @(negedge clk); rst_n = 1; #500;
    foreach (t0[c, r]) begin
      t0[c][r] = -1; expw[c][r] = 24'h0;
      if ($urandom % 100 < 3) begin
        t0[c][r] = 5 + $urandom % 150; len[c][r] = 1 + $urandom % 25;
        pat[c][r] = NFE'($urandom) | NFE'(1);
        expw[c][r] = pixel_word(1, 0, 200 - t0[c][r] - 2,
                                (t0[c][r] + len[c][r] + 1 < 200) ? len[c][r] : 200 - t0[c][r] - 2,
                                pat[c][r]);
        nhit++;
      end
    end
    wreg(8'h00, 8'b000_00_1_00);
    wreg(8'h01, 8'h01);
    @(negedge clk);
    for (int e = 0; e < 210; e++) begin
      shutter = (e < 200);
      foreach (t0[c, r])
        disc[c][r] = (t0[c][r] >= 0 && e >= t0[c][r] && e < t0[c][r] + len[c][r]) ? pat[c][r] : '0;
      @(negedge clk);
    end
    disc = '0;
    wreg(8'h01, 8'h00);
    readout(1'b1, words, flag);
    foreach (words[c, r]) chk($sformatf("pixel c%0d r%0d", c, r), words[c][r], expw[c][r]);
    $display("hit pixels=%0d stall=%0d bypass=%0d filler=%0d", nhit, n_stall, n_bypass, n_fill);
    checks++; if (n_stall == 0)  begin failures++; $display("no stall"); end
    checks++; if (n_bypass == 0) begin failures++; $display("no bypass"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
