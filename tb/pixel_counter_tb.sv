// pixel_counter_tb: checks the LFSR sequences against a reference, their
// maximal periods (255, 31, 8191), and the shift-register mode.
module pixel_counter_tb;
  import clictd_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  logic count_mode, toa_step, tot_step, shift_en, shift_in, shift_out;
  mode_e mode;
  logic [12:0] value;
  int checks = 0, failures = 0;

  pixel_counter dut (.*);
  always #5 clk = ~clk;

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int period;
    logic [12:0] pat;
    count_mode = 1; mode = MODE_NOMINAL; toa_step = 0; tot_step = 0; shift_en = 0; shift_in = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    // nominal: 37 ToA steps, 11 ToT steps, interleaved
    for (int i = 0; i < 40; i++) begin
      toa_step = (i < 37); tot_step = (i % 3 == 0) && (i < 33);
      @(negedge clk);
    end
    toa_step = 0; tot_step = 0;
    chk("nominal", value, {lfsr_steps(5, TAPS5, 11)[4:0], lfsr_steps(8, TAPS8, 37)[7:0]});
    // ToA period 255
    period = 0;
    do begin toa_step = 1; @(negedge clk); period++; end
    while (value[7:0] != lfsr_steps(8, TAPS8, 37)[7:0] && period < 300);
    toa_step = 0;
    chk("toa period", period, 255);
    period = 0;
    do begin tot_step = 1; @(negedge clk); period++; end
    while (value[12:8] != lfsr_steps(5, TAPS5, 11)[4:0] && period < 40);
    tot_step = 0;
    chk("tot period", period, 31);
    // shift mode: shift a pattern in and read it out again
    count_mode = 0; pat = 13'h1A5C;
    for (int i = 12; i >= 0; i--) begin shift_en = 1; shift_in = pat[i]; @(negedge clk); end
    shift_en = 0;
    chk("shifted in", value, pat);
    for (int i = 12; i >= 0; i--) begin
      chk("shift out", shift_out, pat[i]);
      shift_en = 1; shift_in = 0; @(negedge clk);
    end
    shift_en = 0;
    chk("cleared", value, 0);
    // shift_en low holds
    @(negedge clk); chk("hold", value, 0);
    // long counter mode: 13-bit LFSR, period 8191
    count_mode = 1; mode = MODE_LONG;
    for (int i = 0; i < 1000; i++) begin toa_step = 1; @(negedge clk); end
    toa_step = 0;
    chk("long 1000", value, lfsr_steps(13, TAPS13, 1000));
    period = 1000;
    do begin toa_step = 1; @(negedge clk); period++; end
    while (value != 0 && period < 9000);
    toa_step = 0;
    chk("long period", period, 8191);
    // tot_step is ignored in long mode
    tot_step = 1; @(negedge clk); tot_step = 0;
    chk("long tot ignored", value, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
