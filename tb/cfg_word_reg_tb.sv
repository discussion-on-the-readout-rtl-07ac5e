// cfg_word_reg_tb: loads random bytes into a 20-column register and checks
// each column bit against the expected position of every byte bit.
module cfg_word_reg_tb;
  localparam int NC = 20;
  logic clk = 0, rst_n = 0, load;
  logic [7:0] data;
  logic [NC-1:0] word;
  logic [7:0] bytes [3];
  int checks = 0, failures = 0;

  cfg_word_reg #(.NCOLS(NC)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    load = 0; data = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int trial = 0; trial < 50; trial++) begin
      for (int b = 0; b < 3; b++) begin
        bytes[b] = 8'($urandom);
        data = bytes[b]; load = 1; @(negedge clk);
        load = 0; data = 8'($urandom); @(negedge clk);
      end
      // byte 2 (last) at columns 7..0, byte 1 at 15..8, byte 0 bits 3..0 at 19..16
      for (int c = 0; c < NC; c++) begin
        checks++;
        if (word[c] !== bytes[2 - c/8][c%8]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
