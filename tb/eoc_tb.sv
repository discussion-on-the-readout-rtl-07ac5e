// eoc_tb: feeds random compressed and uncompressed column streams with
// random shift gaps; checks that done rises exactly after the last bit of
// the last pixel, and the pixel, hit and bit counts.
module eoc_tb;
  localparam int NROWS = 7;
  logic clk = 0, rst_n = 0;
  logic clear, compress, shift, bit_in, done;
  logic [2:0] n_pix, n_hits;
  logic [$clog2(NROWS*24+1)-1:0] n_bits;
  int checks = 0, failures = 0;

  eoc #(.NROWS(NROWS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    clear = 0; compress = 0; shift = 0; bit_in = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int trial = 0; trial < 60; trial++) begin
      automatic logic stream [$];
      automatic int hits = 0, sent = 0;
      compress = trial[0];
      for (int r = 0; r < NROWS; r++) begin
        automatic logic h = ($urandom % 3 == 0);
        hits += h;
        stream.push_back(h);
        if (h || !compress) for (int b = 0; b < 23; b++) stream.push_back($urandom);
      end
      clear = 1; @(negedge clk); clear = 0;
      while (sent < stream.size()) begin
        checks++; if (done) begin failures++; $display("early done at %0d", sent); end
        if ($urandom % 3 != 0) begin
          shift = 1; bit_in = stream[sent]; sent++;
        end else shift = 0;
        @(negedge clk);
      end
      shift = 0;
      checks++; if (!done) failures++;
      checks++; if (n_pix != NROWS) failures++;
      checks++; if (n_hits != hits) failures++;
      checks++; if (n_bits != stream.size()) failures++;
      // further shifts are ignored once done
      shift = 1; bit_in = 1; @(negedge clk); shift = 0;
      checks++; if (n_bits != stream.size() || n_pix != NROWS) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
