// pixel_asm_tb: drives hit / shutter sequences and counts the steps the
// state machines request: ToA from first hit to shutter close, ToT during
// the first hit only, photon counts per rising edge, one hit-flag set.
module pixel_asm_tb;
  import clictd_pkg::*;
  logic clk = 0, rst_n = 0;
  logic count_mode, shutter, hit, tot_en;
  mode_e mode;
  logic toa_step, tot_step, hf_set;
  int n_toa, n_tot, n_hf;
  int checks = 0, failures = 0;

  pixel_asm dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    n_toa += toa_step; n_tot += tot_step; n_hf += hf_set;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  // shutter open for T cycles; hit pulses given as (start, length) pairs
  task automatic frame(input mode_e m, input int T, input int starts[], input int lens[],
                       input int div);
    mode = m; count_mode = 1; n_toa = 0; n_tot = 0; n_hf = 0;
    @(negedge clk); shutter = 1;
    for (int t = 0; t < T + 10; t++) begin
      hit = 0;
      foreach (starts[i]) if (t >= starts[i] && t < starts[i] + lens[i]) hit = 1;
      tot_en = (t % div == 0);
      if (t == T) shutter = 0;
      @(negedge clk);
    end
    count_mode = 0; hit = 0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    count_mode = 0; shutter = 0; hit = 0; tot_en = 0; mode = MODE_NOMINAL;
    n_toa = 0; n_tot = 0; n_hf = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    // nominal: hit at 10 for 7 cycles, shutter 100 cycles, second hit ignored
    frame(MODE_NOMINAL, 100, '{10, 40}, '{7, 5}, 1);
    chk("toa", n_toa, 90); chk("tot", n_tot, 7); chk("hf", n_hf, 1);
    // ToT with clock divided by 4: strobes at t%4==0 within [20,33)
    frame(MODE_NOMINAL, 60, '{20}, '{13}, 4);
    chk("toa div", n_toa, 40); chk("tot div", n_tot, 4); chk("hf", n_hf, 1);
    // hit still high when shutter closes: ToT stops at shutter close
    frame(MODE_NOMINAL, 50, '{45}, '{20}, 1);
    chk("toa late", n_toa, 5); chk("tot late", n_tot, 5);
    // no hit
    frame(MODE_NOMINAL, 50, '{}, '{}, 1);
    chk("toa none", n_toa, 0); chk("hf none", n_hf, 0);
    // long counter mode
    frame(MODE_LONG, 300, '{17, 100}, '{3, 3}, 1);
    chk("long", n_toa, 283); chk("long tot", n_tot, 0);
    // photon counting: 5 pulses, one after shutter close
    frame(MODE_PHOTON, 200, '{5, 20, 50, 80, 199, 205}, '{3, 10, 1, 30, 4, 2}, 1);
    chk("photon", n_toa, 5); chk("photon hf", n_hf, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
