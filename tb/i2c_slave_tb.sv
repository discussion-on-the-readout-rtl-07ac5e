// i2c_slave_tb: an I2C master model writes register bytes (single and
// streamed), reads them back through a repeated start, and addresses
// another device, which must be ignored (no acknowledge, no write).
module i2c_slave_tb;
  logic clk = 0, rst_n = 0;
  logic scl_i, sda_i, sda_oe, wr_stb;
  logic [7:0] reg_addr, wr_data, rd_data;
  logic scl_m = 1, sda_m = 1;
  logic [7:0] regs [256];
  int n_wr = 0, checks = 0, failures = 0;

  assign scl_i = scl_m;
  assign sda_i = sda_m & ~sda_oe;
  assign rd_data = regs[reg_addr] ^ 8'h5A;

  i2c_slave #(.ADDR(7'h2A)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (wr_stb) begin regs[reg_addr] <= wr_data; n_wr++; end

  localparam int Q = 100;  // quarter SCL period in ns
  task automatic i2c_start(); sda_m = 1; #Q; scl_m = 1; #Q; sda_m = 0; #Q; scl_m = 0; #Q; endtask
  task automatic i2c_stop();  sda_m = 0; #Q; scl_m = 1; #Q; sda_m = 1; #Q; endtask
  task automatic wbit(input logic b); sda_m = b; #Q; scl_m = 1; #(2*Q); scl_m = 0; #Q; endtask
  task automatic rbit(output logic b); sda_m = 1; #Q; scl_m = 1; #Q; b = sda_i; #Q; scl_m = 0; #Q; endtask
  task automatic wbyte(input logic [7:0] v, output logic ack);
    logic b;
    for (int i = 7; i >= 0; i--) wbit(v[i]);
    rbit(b); ack = !b;
  endtask
  task automatic rbyte(output logic [7:0] v, input logic ack);
    for (int i = 7; i >= 0; i--) rbit(v[i]);
    wbit(!ack);
  endtask

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    #5ms;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic ack;
    logic [7:0] v, vals [4];
    foreach (regs[i]) regs[i] = 0;
    repeat (3) @(negedge clk); rst_n = 1; #200;
    for (int trial = 0; trial < 6; trial++) begin
      automatic logic [7:0] ra = 8'($urandom);
      automatic int wr0 = n_wr;
      foreach (vals[i]) vals[i] = 8'($urandom);
      // streamed write of 4 bytes into one register
      i2c_start(); wbyte({7'h2A, 1'b0}, ack); chk("addr ack", ack, 1);
      wbyte(ra, ack); chk("reg ack", ack, 1);
      foreach (vals[i]) begin wbyte(vals[i], ack); chk("data ack", ack, 1); end
      i2c_stop(); #200;
      chk("writes", n_wr - wr0, 4);
      chk("reg value", regs[ra], vals[3]);
      // read back twice in one transaction
      i2c_start(); wbyte({7'h2A, 1'b0}, ack); wbyte(ra, ack);
      i2c_start(); wbyte({7'h2A, 1'b1}, ack); chk("raddr ack", ack, 1);
      rbyte(v, 1); chk("read 1", v, vals[3] ^ 8'h5A);
      rbyte(v, 0); chk("read 2", v, vals[3] ^ 8'h5A);
      i2c_stop(); #200;
      // other address: ignored
      wr0 = n_wr;
      i2c_start(); wbyte({7'h2B, 1'b0}, ack); chk("foreign nack", ack, 0);
      wbyte(ra, ack); wbyte(8'hFF, ack);
      i2c_stop(); #200;
      chk("no write", n_wr - wr0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
