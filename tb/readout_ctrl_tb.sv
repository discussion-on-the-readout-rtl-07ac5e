// readout_ctrl_tb: six model columns with random bit streams of random
// lengths (their end-of-column flag rises when the stream is exhausted)
// and a link that takes a symbol every five clocks.  The received frame
// (K27.7, data, K29.7, K28.5 fillers dropped) must equal the streams packed
// two lanes at a time with zero padding; stalls must occur.
module readout_ctrl_tb;
  localparam int NC = 6, NP = 2;
  logic clk = 0, rst_n = 0;
  logic start, sym_req, eoc_clear, sym_k, busy, done, stall;
  logic [NC-1:0] eoc_done, col_dout, col_shift;
  logic [7:0] sym_data;
  logic s [NC][$];
  int ptr [NC];
  int n_stall = 0, n_fill = 0, n_done = 0, cyc = 0;
  int checks = 0, failures = 0;
  logic [8:0] rx [$];

  readout_ctrl #(.NCOLS(NC), .NPAR(NP)) dut (.*);
  always #5 clk = ~clk;

  always_comb
    for (int c = 0; c < NC; c++) begin
      eoc_done[c] = (ptr[c] >= s[c].size());
      col_dout[c] = (ptr[c] < s[c].size()) ? s[c][ptr[c]] : 1'b0;
    end
  assign sym_req = (cyc % 5 == 4);

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (eoc_clear) foreach (ptr[c]) ptr[c] <= 0;
    else for (int c = 0; c < NC; c++) if (col_shift[c]) begin
      if (eoc_done[c]) begin failures++; $display("shift of finished column %0d", c); end
      ptr[c] <= ptr[c] + 1;
    end
    if (rst_n && sym_req) rx.push_back({sym_k, sym_data});
    n_stall += stall; n_done += done;
    if (sym_req && sym_k && sym_data == 8'hBC && busy && dut.state == 2) n_fill++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    start = 0;
    foreach (ptr[c]) ptr[c] = 1000;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int trial = 0; trial < 8; trial++) begin
      automatic logic [8:0] expq [$], got [$];
      int i0;
      for (int c = 0; c < NC; c++) begin
        automatic int len = 1 + $urandom % 60;
        s[c] = {};
        for (int b = 0; b < len; b++) s[c].push_back($urandom);
      end
      // expected frame
      expq.push_back({1'b1, 8'hFB});
      for (int g = 0; g < NC/NP; g++) begin
        automatic int L = (s[g*NP].size() > s[g*NP+1].size()) ? s[g*NP].size() : s[g*NP+1].size();
        automatic int steps = ((L + 3) / 4) * 4;
        automatic logic [7:0] acc = 0;
        for (int i = 0; i < steps; i++) begin
          for (int j = 0; j < NP; j++)
            acc = {acc[6:0], (i < s[g*NP+j].size()) ? s[g*NP+j][i] : 1'b0};
          if (i % 4 == 3) expq.push_back({1'b0, acc});
        end
      end
      expq.push_back({1'b1, 8'hFD});
      rx = {};
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      checks++; if (!busy) failures++;
      wait (n_done == trial + 1);
      repeat (6) @(negedge clk);
      checks++; if (busy) failures++;
      foreach (rx[i]) if (!(rx[i] == {1'b1, 8'hBC})) got.push_back(rx[i]);
      checks++;
      if (got.size() != expq.size()) begin
        failures++; $display("trial %0d: %0d symbols, expected %0d", trial, got.size(), expq.size());
      end else foreach (expq[i]) begin
        checks++;
        if (got[i] !== expq[i]) begin failures++; $display("sym %0d: %h vs %h", i, got[i], expq[i]); end
      end
    end
    checks++; if (n_stall == 0) begin failures++; $display("no stall seen"); end
    checks++; if (n_fill == 0) begin failures++; $display("no in-frame filler seen"); end
    $display("stalls=%0d fillers=%0d", n_stall, n_fill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
