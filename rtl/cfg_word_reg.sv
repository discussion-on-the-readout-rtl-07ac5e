// cfg_word_reg: the configuration word register, one bit per column.
//
// Configuration data arrive over the slow-control link a byte at a time;
// each byte written shifts the register by 8 places (towards the highest
// column), so after ceil(NCOLS/8) bytes it holds one configuration bit for
// every column.  The matrix then takes one shift with word[c] as the data
// input of column c.  The first byte written ends at the highest columns;
// within a byte bit 7 goes to the higher column.  Bits pushed past column
// NCOLS-1 are lost.
module cfg_word_reg #(
  parameter int unsigned NCOLS = 100
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,   // one byte strobe
  input  logic [7:0]       data,
  output logic [NCOLS-1:0] word
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    word <= '0;
    else if (load) word <= NCOLS'({word, data});
  end

endmodule
