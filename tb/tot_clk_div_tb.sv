// tot_clk_div_tb: counts the ToT strobes over 800 clocks for every divider
// setting and checks their spacing.
module tot_clk_div_tb;
  logic clk = 0, rst_n = 0, tot_en;
  logic [1:0] div;
  int checks = 0, failures = 0;

  tot_clk_div dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    div = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int d = 0; d < 4; d++) begin
      automatic int n = 0, last = -1, gap_bad = 0;
      div = 2'(d); @(negedge clk);
      for (int t = 0; t < 800; t++) begin
        if (tot_en) begin
          if (last >= 0 && t - last != (1 << d)) gap_bad++;
          last = t; n++;
        end
        @(negedge clk);
      end
      checks++; if (n != 800 >> d) begin failures++; $display("div %0d: %0d strobes", d, n); end
      checks++; if (gap_bad != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
