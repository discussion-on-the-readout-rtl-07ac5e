// serializer_ddr_tb: random symbols go in on each request; the bit pairs
// coming out must rebuild them, MSB first, one symbol every five clocks.
module serializer_ddr_tb;
  logic clk = 0, rst_n = 0;
  logic [9:0] sym;
  logic sym_req;
  logic [1:0] dout;
  logic [9:0] sent [$];
  int checks = 0, failures = 0;

  serializer_ddr dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int last_req = -1, cyc = 0;
    logic [9:0] rx;
    sym = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    // the first request comes at once
    checks++; if (!sym_req) failures++;
    for (int n = 0; n < 300; n++) begin
      sym = 10'($urandom);
      while (!sym_req) begin @(negedge clk); cyc++; end
      if (last_req >= 0) begin checks++; if (cyc - last_req != 5) failures++; end
      last_req = cyc;
      sent.push_back(sym);
      @(negedge clk); cyc++;
      rx = '0;
      for (int p = 0; p < 5; p++) begin
        rx = {rx[7:0], dout};
        if (p < 4) begin @(negedge clk); cyc++; end
      end
      checks++;
      if (rx !== sent.pop_front()) begin failures++; $display("sym %0d mismatch", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
