// slow_ctrl_regs_tb: writes every register, checks the decoded outputs,
// the one-clock command pulses and the read-back values and status bits.
module slow_ctrl_regs_tb;
  import clictd_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] reg_addr, wr_data, rd_data, cfg_data;
  logic wr_stb, ro_busy, ro_done, count_mode, cfg_load, cfg_shift, ro_start;
  logic [2:0] conf;
  global_cfg_t gcfg;
  int n_load, n_shift, n_start, checks = 0, failures = 0;

  slow_ctrl_regs dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    n_load += cfg_load; n_shift += cfg_shift; n_start += ro_start;
  end

  task automatic wr(input logic [7:0] a, input logic [7:0] v);
    reg_addr = a; wr_data = v; wr_stb = 1; @(negedge clk); wr_stb = 0; @(negedge clk);
  endtask
  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    reg_addr = 0; wr_data = 0; wr_stb = 0; ro_busy = 0; ro_done = 0;
    n_load = 0; n_shift = 0; n_start = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int m = 0; m < 3; m++) begin
      automatic logic [7:0] v = {3'b0, 2'(m+1), 1'(m), 2'(m)};
      wr(8'h00, v);
      chk("mode", gcfg.mode, m); chk("compress", gcfg.compress, m & 1);
      chk("totdiv", gcfg.tot_div, (m+1) & 3);
      reg_addr = 8'h00; #1 chk("rd gcfg", rd_data, v);
    end
    wr(8'h01, 8'b0000_1011);
    chk("count_mode", count_mode, 1); chk("conf", conf, 3'b101);
    reg_addr = 8'h01; #1 chk("rd mctrl", rd_data, 8'h0B);
    for (int i = 0; i < 5; i++) begin
      wr(8'h02, 8'(i * 37));
      chk("cfg_data", cfg_data, {24'd0, 8'(i * 37)});
    end
    chk("loads", n_load, 5);
    wr(8'h03, 8'h00); wr(8'h03, 8'h00);
    chk("shifts", n_shift, 2);
    wr(8'h04, 8'h00); chk("no start", n_start, 0);
    wr(8'h04, 8'h01); chk("start", n_start, 1);
    ro_busy = 1; reg_addr = 8'h05; #1 chk("busy", rd_data, 8'h01);
    @(negedge clk); ro_busy = 0; ro_done = 1; @(negedge clk); ro_done = 0;
    #1 chk("finished", rd_data, 8'h02);
    wr(8'h04, 8'h01); reg_addr = 8'h05; #1 chk("cleared", rd_data, 8'h00);
    reg_addr = 8'h77; #1 chk("unmapped", rd_data, 8'h00);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
