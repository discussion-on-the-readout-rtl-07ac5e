// serializer_ddr: 10:1 serialiser for the 8b/10b symbols, double data rate.
//
// Each clock it emits two bits, dout[1] for the rising-edge half period and
// dout[0] for the falling-edge half period, so a 320 MHz readout clock gives
// the 640 Mbit/s output rate of the CLICTD link.  A symbol lasts five
// clocks; sym_req is high in the last clock of a symbol, and the symbol
// presented then is loaded on that edge (first bit code[9]).  After reset
// the serialiser requests a symbol at once and sends zeros until then.  The
// actual DDR multiplexer and differential driver are pad cells outside this
// RTL.
module serializer_ddr (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [9:0] sym,
  output logic       sym_req,
  output logic [1:0] dout
);

  logic [9:0] sh;
  logic [2:0] cnt;

  assign sym_req = (cnt == 3'd4);
  assign dout    = sh[9:8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh  <= '0;
      cnt <= 3'd4;
    end else if (sym_req) begin
      sh  <= sym;
      cnt <= '0;
    end else begin
      sh  <= {sh[7:0], 2'b00};
      cnt <= cnt + 1'b1;
    end
  end

endmodule
