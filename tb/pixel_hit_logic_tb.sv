// pixel_hit_logic_tb: random discriminator, mask and test-pulse patterns;
// checks the masked outputs at once and the synchronised hit two clocks later.
module pixel_hit_logic_tb;
  logic clk = 0, rst_n = 0;
  logic [9:0] disc, mask, fe_hit;
  logic dtp_en, test_pulse, hit_sync;
  logic exp_q [$];
  int checks = 0, failures = 0;

  pixel_hit_logic dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    disc = '0; mask = '0; dtp_en = 0; test_pulse = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    exp_q = '{1'b0, 1'b0};
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      disc = 10'($urandom); mask = 10'($urandom) & 10'($urandom);
      if ($urandom % 4 == 0) disc = '0;
      dtp_en = ($urandom % 5 == 0); test_pulse = $urandom;
      #1;
      checks++; if (fe_hit !== (disc & ~mask)) failures++;
      exp_q.push_back(dtp_en ? test_pulse : |(disc & ~mask));
      @(posedge clk); #1;
      void'(exp_q.pop_front());
      checks++;
      if (hit_sync !== exp_q[0]) begin
        failures++; if (failures < 5) $display("hit_sync mismatch at %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
