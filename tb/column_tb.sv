// column_tb: a 4-row column; hits in rows 1 and 3, read compressed (lowest
// row first, 1 bit per empty pixel) and uncompressed (24 bits per pixel);
// checks that the zeros shifted in leave the column clear.
module column_tb;
  import clictd_pkg::*;
  import tb_util_pkg::*;
  localparam int NR = 4;
  logic clk = 0, rst_n = 0;
  logic [NR-1:0][9:0] disc;
  logic count_mode, shutter, tot_en, test_pulse, shift_en, din, dout;
  logic [2:0] conf;
  global_cfg_t gcfg;
  fe_cfg_t [NR-1:0][9:0] fe_cfg;
  logic [NR-1:0] hit_flag;
  int checks = 0, failures = 0;

  column #(.NROWS(NR)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  task automatic acquire(input int T);
    count_mode = 1; @(negedge clk);
    for (int e = 0; e < T + 6; e++) begin
      shutter = (e < T);
      disc = '0;
      if (e >= 10 && e < 15) disc[1] = 10'b0000010001;   // row 1
      if (e >= 40 && e < 47) disc[3] = 10'b1000000000;   // row 3
      @(negedge clk);
    end
    disc = '0; shutter = 0; count_mode = 0; @(negedge clk);
  endtask

  task automatic read_bits(input int n, ref logic q [$]);
    for (int i = 0; i < n; i++) begin
      q.push_back(dout); shift_en = 1; din = 0; @(negedge clk);
    end
    shift_en = 0; @(negedge clk);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic got [$];
    logic [23:0] w1, w3;
    logic expq [$];
    disc = 0; count_mode = 0; shutter = 0; tot_en = 1; test_pulse = 0; shift_en = 0; din = 0;
    conf = 0; gcfg = '{tot_div: 2'd0, compress: 1'b1, mode: MODE_NOMINAL};
    repeat (2) @(negedge clk); rst_n = 1;
    w1 = pixel_word(1, 0, 80-10-2, 5, 10'b0000010001);
    w3 = pixel_word(1, 0, 80-40-2, 7, 10'b1000000000);

    // compressed
    acquire(80);
    chk("flags", hit_flag, 4'b1010);
    expq = {};
    expq.push_back(0);
    for (int i = 23; i >= 0; i--) expq.push_back(w1[i]);
    expq.push_back(0);
    for (int i = 23; i >= 0; i--) expq.push_back(w3[i]);
    got = {};
    read_bits(expq.size() + 10, got);
    foreach (expq[i]) chk($sformatf("comp bit %0d", i), got[i], expq[i]);
    for (int i = expq.size(); i < got.size(); i++) chk("comp tail", got[i], 0);

    // uncompressed, same hits
    gcfg.compress = 0;
    acquire(80);
    expq = {};
    for (int r = 0; r < NR; r++) begin
      automatic logic [23:0] w = (r == 1) ? w1 : (r == 3) ? w3 : 24'h0;
      for (int i = 23; i >= 0; i--) expq.push_back(w[i]);
    end
    got = {};
    read_bits(96, got);
    foreach (expq[i]) chk($sformatf("unc bit %0d", i), got[i], expq[i]);

    // everything cleared: a second uncompressed readout is all zero
    got = {};
    read_bits(96, got);
    foreach (got[i]) chk("clear", got[i], 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
