// enc_8b10b_tb: known code words (D0.0, D21.5, K28.5, K27.7, K29.7 in both
// disparities), every data byte at both disparities against a table-driven
// reference, and a long random stream checked for disparity bounds and the
// maximum run length of 5.
module enc_8b10b_tb;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0, en, k, rd_pos;
  logic [7:0] d;
  logic [9:0] code;
  int checks = 0, failures = 0;

  enc_8b10b dut (.*);
  always #5 clk = ~clk;

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %b exp %b", what, got, exp); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [10:0] r;
    int run, disp;
    logic prev;
    en = 0; k = 0; d = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    // known words at RD- (reset state), no disparity update
    k = 0; d = 8'h00; #1 chk("D0.0-", code, 10'b1001110100);
    k = 0; d = 8'hB5; #1 chk("D21.5-", code, 10'b1010101010);
    k = 1; d = 8'hBC; #1 chk("K28.5-", code, 10'b0011111010);
    k = 1; d = 8'hFB; #1 chk("K27.7-", code, 10'b1101101000);
    k = 1; d = 8'hFD; #1 chk("K29.7-", code, 10'b1011101000);
    // take K28.5 -> RD+
    k = 1; d = 8'hBC; en = 1; @(negedge clk); en = 0;
    chk("rd after K28.5", rd_pos, 1);
    k = 1; d = 8'hBC; #1 chk("K28.5+", code, 10'b1100000101);
    k = 0; d = 8'h00; #1 chk("D0.0+", code, 10'b0110001011);
    // exhaustive data bytes at the current (+) disparity, then at -
    for (int pass = 0; pass < 2; pass++) begin
      for (int b = 0; b < 256; b++) begin
        k = 0; d = 8'(b); #1;
        r = enc8b10b(rd_pos, 0, d);
        chk($sformatf("D%0d rd%0d", b, rd_pos), code, r[9:0]);
      end
      k = 1; d = 8'hBC; en = 1; @(negedge clk); en = 0;
    end
    // random stream: running disparity and run length
    disp = 0; run = 0; prev = 0;
    for (int n = 0; n < 3000; n++) begin
      k = ($urandom % 10 == 0);
      d = k ? ((n % 3 == 0) ? 8'hBC : (n % 3 == 1) ? 8'hFB : 8'hFD) : 8'($urandom);
      #1;
      r = enc8b10b(rd_pos, k, d);
      chk("stream", code, r[9:0]);
      for (int i = 9; i >= 0; i--) begin
        disp += code[i] ? 1 : -1;
        run = (n == 0 && i == 9) ? 1 : (code[i] == prev) ? run + 1 : 1;
        prev = code[i];
        if (run > 5) begin failures++; $display("run > 5 at %0d", n); end
      end
      checks++; if (disp != 0 && disp != 2 && disp != -2 && disp != 1 && disp != -1)
        begin failures++; $display("disparity %0d", disp); end
      en = 1; @(negedge clk); en = 0;
      chk("rd track", rd_pos, r[10]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
