// pixel_tb: one pixel through configuration (3 stages of 24 shifted bits),
// a clearing readout, acquisitions in the three modes and compressed /
// uncompressed readouts, checking the settings and the 24-bit words.
module pixel_tb;
  import clictd_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [9:0] disc;
  logic count_mode, shutter, tot_en, test_pulse, shift_en, din, dout, hit_flag;
  logic [2:0] conf;
  global_cfg_t gcfg;
  fe_cfg_t [9:0] fe_cfg;
  logic [50:0] cfg_ref;
  int checks = 0, failures = 0;

  pixel dut (.*);
  always #5 clk = ~clk;

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  task automatic configure(input logic [50:0] c);
    gcfg.compress = 0; count_mode = 0;
    for (int s = 0; s < 3; s++) begin
      logic [23:0] chainval = 24'($urandom);
      chainval[22:6] = c[17*s +: 17];
      conf[s] = 1;
      for (int i = 0; i < 24; i++) begin
        din = chainval[23-i]; shift_en = 1; @(negedge clk);
      end
      // the stage latch must see the final chain for one clock
      shift_en = 0; @(negedge clk);
      conf[s] = 0; @(negedge clk);
    end
  endtask

  task automatic readout(input int n, output logic [23:0] w);
    count_mode = 0; din = 0; w = '0;
    @(negedge clk);
    for (int i = 0; i < n; i++) begin
      w = {w[22:0], dout}; shift_en = 1; @(negedge clk);
    end
    shift_en = 0; @(negedge clk);
  endtask

  // shutter for edges 0..T-1, front-end fe high for edges t..t+L-1
  task automatic acquire(input mode_e m, input int T, input int t, input int L,
                         input logic [9:0] fes, input int npulse = 1);
    gcfg.mode = m; gcfg.compress = 1; count_mode = 1;
    @(negedge clk);
    for (int e = 0; e < T + 6; e++) begin
      shutter = (e < T);
      disc = '0;
      for (int p = 0; p < npulse; p++)
        if (e >= t + p*(L+3) && e < t + p*(L+3) + L) disc = fes;
      test_pulse = disc[0];
      @(negedge clk);
    end
    disc = '0; test_pulse = 0; shutter = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [23:0] w;
    disc = 0; count_mode = 0; shutter = 0; tot_en = 1; test_pulse = 0; shift_en = 0; din = 0;
    conf = 0; gcfg = '{tot_div: 2'd0, compress: 1'b0, mode: MODE_NOMINAL};
    repeat (2) @(negedge clk); rst_n = 1;

    // configuration: random thresholds, front-end 3 and 7 masked, no dtp
    cfg_ref = {$urandom, $urandom};
    for (int i = 0; i < 10; i++) cfg_ref[5*i+3] = (i == 3 || i == 7);
    cfg_ref[50] = 0;
    configure(cfg_ref);
    for (int i = 0; i < 10; i++) begin
      chk("thadj", fe_cfg[i].thadj, cfg_ref[5*i +: 3]);
      chk("mask", fe_cfg[i].mask, cfg_ref[5*i+3]);
      chk("tp_en", fe_cfg[i].tp_en, cfg_ref[5*i+4]);
    end
    readout(24, w);   // clear the chain, uncompressed
    chk("after clear", {dut.u_hb.bits, dut.u_cnt.value, dout}, 0);

    // nominal: hit on front-ends 2 and 3 (3 masked) at 20 for 9 cycles
    acquire(MODE_NOMINAL, 100, 20, 9, 10'b0000001100);
    count_mode = 0; gcfg.compress = 1;
    chk("hit flag", hit_flag, 1);
    readout(24, w);
    chk("nominal word", w, pixel_word(1, 0, 100-20-2, 9, 10'b0000000100));

    // no hit, compressed: one zero bit, then the pixel passes din through
    acquire(MODE_NOMINAL, 50, 100, 1, 10'b1);
    count_mode = 0;
    chk("no-hit flag", hit_flag, 0);
    chk("no-hit bit", dout, 0);
    din = 1; shift_en = 1; @(negedge clk);
    chk("bypass", dout, 1);
    din = 0; @(negedge clk); shift_en = 0;
    chk("bypass 0", dout, 0);

    // long counter mode
    acquire(MODE_LONG, 400, 30, 4, 10'b1000000000);
    readout(24, w);
    chk("long word", w, pixel_word(1, 1, 400-30-2, 0, 10'b1000000000));

    // photon counting: 6 pulses of 4 cycles on front-end 0
    acquire(MODE_PHOTON, 200, 10, 4, 10'b1, 6);
    readout(24, w);
    chk("photon word", w, pixel_word(1, 2, 6, 0, 10'b1));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
