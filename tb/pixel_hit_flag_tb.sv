// pixel_hit_flag_tb: the hit flag is set by hf_set, held through readout by
// the latch, and the multiplexer bypasses the chain only for a pixel
// without hit when compression is on.
module pixel_hit_flag_tb;
  logic clk = 0, rst_n = 0;
  logic count_mode, compress, hf_set, shift_en, bypass_in, chain_in;
  logic use_chain, dout, hit_flag;
  int checks = 0, failures = 0;

  pixel_hit_flag dut (.*);
  always #5 clk = ~clk;

  task automatic chk(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %b exp %b", what, got, exp); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    count_mode = 1; compress = 1; hf_set = 0; shift_en = 0; bypass_in = 0; chain_in = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int trial = 0; trial < 40; trial++) begin
      automatic logic hit = trial[0];
      compress = trial[1];
      count_mode = 1;
      repeat (3) @(negedge clk);
      if (hit) begin hf_set = 1; @(negedge clk); hf_set = 0; end
      repeat (2) @(negedge clk);
      chk("flag", dout, hit);
      count_mode = 0; @(negedge clk);
      chk("latch", hit_flag, hit);
      chk("use_chain", use_chain, hit || !compress);
      for (int i = 0; i < 30; i++) begin
        logic exp;
        bypass_in = $urandom; chain_in = $urandom;
        exp = (hit || !compress) ? chain_in : bypass_in;
        shift_en = 1; @(negedge clk); shift_en = 0;
        chk("mux", dout, exp);
        chk("latch hold", use_chain, hit || !compress);
      end
      bypass_in = 0; chain_in = 0; shift_en = 1; @(negedge clk); shift_en = 0;
      chk("zero", dout, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
