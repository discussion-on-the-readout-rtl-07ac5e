// pixel_hit_bits_tb: hits are accumulated only with the shutter open in
// counting mode, then shifted out MSB first while zeros come in.
module pixel_hit_bits_tb;
  logic clk = 0, rst_n = 0;
  logic count_mode, shutter, shift_en, shift_in, shift_out;
  logic [9:0] fe_hit, bits, exp_bits;
  int checks = 0, failures = 0;

  pixel_hit_bits dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    count_mode = 1; shutter = 0; fe_hit = 0; shift_en = 0; shift_in = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int trial = 0; trial < 50; trial++) begin
      exp_bits = '0; count_mode = 1;
      for (int t = 0; t < 30; t++) begin
        shutter = (t >= 5 && t < 25);
        fe_hit = ($urandom % 4 == 0) ? 10'(1 << ($urandom % 10)) : '0;
        if (shutter) exp_bits |= fe_hit;
        @(negedge clk);
      end
      fe_hit = '0;
      checks++; if (bits !== exp_bits) failures++;
      count_mode = 0;
      for (int i = 9; i >= 0; i--) begin
        // a hit during readout must not disturb the data
        fe_hit = 10'($urandom);
        checks++; if (shift_out !== exp_bits[i]) failures++;
        shift_en = 1; @(negedge clk);
        shift_en = 0; @(negedge clk);
      end
      checks++; if (bits !== '0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
