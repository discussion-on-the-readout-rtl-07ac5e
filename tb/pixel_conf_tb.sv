// pixel_conf_tb: three stages latched one after another from the chain
// bits; checks the decoded front-end settings and the digital test pulse
// enable against the 51-bit layout.
module pixel_conf_tb;
  import clictd_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [2:0] conf;
  logic [16:0] chain;
  fe_cfg_t [9:0] fe_cfg;
  logic dtp_en;
  logic [50:0] ref_bits;
  int checks = 0, failures = 0;

  pixel_conf dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    conf = 0; chain = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int trial = 0; trial < 30; trial++) begin
      for (int s = 0; s < 3; s++) begin
        automatic logic [16:0] v = 17'($urandom);
        ref_bits[17*s +: 17] = v;
        chain = 17'($urandom); conf[s] = 1; @(negedge clk);   // transparent
        chain = v; @(negedge clk);
        conf[s] = 0; @(negedge clk);
        chain = 17'($urandom); @(negedge clk);                 // held
      end
      for (int i = 0; i < 10; i++) begin
        checks++;
        if (fe_cfg[i].thadj !== ref_bits[5*i +: 3] || fe_cfg[i].mask !== ref_bits[5*i+3] ||
            fe_cfg[i].tp_en !== ref_bits[5*i+4]) failures++;
      end
      checks++; if (dtp_en !== ref_bits[50]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
