// clictd_top_tb: end-to-end test of a 4 x 3 pixel chip over its pins.
//
// An I2C master configures all pixels in three stages (one configuration
// word per matrix shift), and each stage is read back uncompressed over the
// serial link, which also clears the matrix.  Then a nominal acquisition
// (with a masked front-end and a digital test pulse) and a photon-counting
// acquisition are read out compressed.  The serial stream is aligned on
// the K28.5 comma, decoded with a reference 8b/10b table, split into column
// lanes and parsed pixel by pixel; every pixel word is compared with the
// value predicted from the stimulus.  Counts how often each mechanism
// occurred (link stall, compressed bypass, masking, digital test pulse,
// in-frame filler, uncompressed readout, mode switch, status read) and
// fails if one never did.
module clictd_top_tb;
  import clictd_pkg::*;
  import tb_util_pkg::*;
  localparam int NC = 4, NR = 3, NP = 2;

  logic clk = 0, rst_n = 0;
  logic scl_m = 1, sda_m = 1, sda_oe, shutter = 0, test_pulse = 0, ro_busy, ro_stall;
  logic [NC-1:0][NR-1:0][NFE-1:0] disc;
  fe_cfg_t [NC-1:0][NR-1:0][NFE-1:0] fe_cfg;
  logic [1:0] ser_dout;
  logic [NC-1:0] col_done;
  wire sda_i = sda_m & ~sda_oe;

  clictd_top #(.NCOLS(NC), .NROWS(NR), .NPAR(NP)) dut (
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
    #50ms;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [50:0] cfg [NC][NR];
    logic [23:0] chainv [NC][NR];
    logic [23:0] words [NC][NR];
    logic flag [NC][NR];
    logic [23:0] expw [NC][NR];
    disc = '0;
    repeat (3) @(negedge clk); rst_n = 1; #500;

    // ---- configuration, compression off ----
    wreg(8'h00, 8'b000_00_0_00);
    for (int c = 0; c < NC; c++)
      for (int r = 0; r < NR; r++) begin
        cfg[c][r] = {$urandom, $urandom};
        for (int i = 0; i < NFE; i++) cfg[c][r][5*i+3] = 1'b0;
        cfg[c][r][50] = 1'b0;
      end
    cfg[2][1][3] = 1'b1;        // mask front-end 0 of pixel (2,1)
    cfg[3][2][50] = 1'b1;       // digital test pulse into pixel (3,2)
    for (int s = 0; s < 3; s++) begin
      for (int c = 0; c < NC; c++)
        for (int r = 0; r < NR; r++) begin
          chainv[c][r] = 24'($urandom);
          chainv[c][r][22:6] = cfg[c][r][17*s +: 17];
        end
      wreg(8'h01, 8'(1 << (s + 1)));          // conf[s] high, count_readout 0
      for (int i = 0; i < 24*NR; i++) begin
        logic [7:0] wbyte_v = '0;
        for (int c = 0; c < NC; c++) wbyte_v[c] = chainv[c][i/24][23 - i%24];
        wreg(8'h02, wbyte_v);
        wreg(8'h03, 8'h00);
      end
      wreg(8'h01, 8'h00);                     // latch the stage
      readout(1'b0, words, flag);            // read back and clear
      for (int c = 0; c < NC; c++)
        for (int r = 0; r < NR; r++)
          chk($sformatf("readback s%0d c%0d r%0d", s, c, r), words[c][r], chainv[c][r]);
    end
    for (int c = 0; c < NC; c++)
      for (int r = 0; r < NR; r++)
        for (int i = 0; i < NFE; i++)
          chk("fe_cfg", fe_cfg[c][r][i], cfg[c][r][5*i +: 5]);

    // ---- nominal acquisition, compressed readout ----
    wreg(8'h00, 8'b000_00_1_00);
    wreg(8'h01, 8'h01);
    @(negedge clk);
    for (int e = 0; e < 130; e++) begin
      shutter = (e < 120);
      disc = '0;
      if (e >= 10 && e < 16) disc[0][0] = 10'b0000010000;
      if (e >= 30 && e < 42) disc[1][2] = 10'b0001100000;
      if (e >= 20 && e < 25) disc[2][1] = 10'b0000000001;   // masked
      if (e >= 5  && e < 45) disc[3][0] = 10'b1000000000;
      test_pulse = (e >= 50 && e < 53);
      @(negedge clk);
    end
    disc = '0; test_pulse = 0;
    wreg(8'h01, 8'h00);
    foreach (expw[c, r]) expw[c][r] = 24'h0;
    expw[0][0] = pixel_word(1, 0, 120-10-2, 6, 10'b0000010000);
    expw[1][2] = pixel_word(1, 0, 120-30-2, 12, 10'b0001100000);
    expw[3][0] = pixel_word(1, 0, 120-5-2, 40, 10'b1000000000);  // 5-bit ToT LFSR wraps after 31
    expw[3][2] = pixel_word(1, 0, 120-50-2, 3, 10'b0);
    readout(1'b1, words, flag);
    for (int c = 0; c < NC; c++)
      for (int r = 0; r < NR; r++) begin
        chk($sformatf("nominal c%0d r%0d", c, r), words[c][r], expw[c][r]);
        n_hitpix += flag[c][r];
      end
    if (!flag[2][1]) n_masked++;
    if (flag[3][2] && words[3][2][9:0] == 0) n_dtp++;

    // ---- photon counting ----
    wreg(8'h00, 8'b000_00_1_10);
    wreg(8'h01, 8'h01);
    @(negedge clk);
    for (int e = 0; e < 110; e++) begin
      shutter = (e < 100);
      disc = '0;
      for (int p = 0; p < 7; p++) if (e >= 8 + 12*p && e < 12 + 12*p) disc[1][1] = 10'b0000000100;
      @(negedge clk);
    end
    disc = '0;
    wreg(8'h01, 8'h00);
    readout(1'b1, words, flag);
    foreach (expw[c, r]) expw[c][r] = 24'h0;
    expw[1][1] = pixel_word(1, 2, 7, 0, 10'b0000000100);
    for (int c = 0; c < NC; c++)
      for (int r = 0; r < NR; r++)
        chk($sformatf("photon c%0d r%0d", c, r), words[c][r], expw[c][r]);
    if (words[1][1] == expw[1][1]) n_photon++;

    $display("mechanisms: stall=%0d bypass=%0d hitpix=%0d masked=%0d dtp=%0d filler=%0d uncompressed=%0d photon=%0d status=%0d",
             n_stall, n_bypass, n_hitpix, n_masked, n_dtp, n_fill, n_uncomp, n_photon, n_status);
    checks++; if (n_stall == 0)  begin failures++; $display("no stall"); end
    checks++; if (n_bypass == 0) begin failures++; $display("no bypass"); end
    checks++; if (n_hitpix == 0) begin failures++; $display("no hit pixel"); end
    checks++; if (n_masked == 0) begin failures++; $display("mask not seen"); end
    checks++; if (n_dtp == 0)    begin failures++; $display("no test pulse"); end
    checks++; if (n_fill == 0)   begin failures++; $display("no filler"); end
    checks++; if (n_uncomp == 0) begin failures++; $display("no uncompressed readout"); end
    checks++; if (n_photon == 0) begin failures++; $display("no photon mode"); end
    checks++; if (n_status == 0) begin failures++; $display("no status read"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
