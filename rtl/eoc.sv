// eoc: end-of-column logic.  It follows the bit stream leaving its column
// and counts the bits read from the current pixel and the pixels read so
// far, honouring the compression scheme.
//
// On each shift it looks at the bit leaving the column.  A pixel's first bit
// is its hit flag: with compression on, a zero flag ends the pixel after one
// bit; otherwise the pixel is 24 bits long.  When NROWS pixels have passed,
// done rises (registered, the cycle after the last shift) and the readout
// controller stops shifting the column; by then the zeros entering at the top
// have cleared every active chain position.  clear (one cycle) restarts the
// count for a new readout.  n_hits counts pixels read with a set hit flag and
// n_bits all bits read, for monitoring.
module eoc
  import clictd_pkg::*;
#(
  parameter int unsigned NROWS = 10
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       compress,
  input  logic                       shift,     // column shifted this cycle
  input  logic                       bit_in,    // column output before shift
  output logic                       done,
  output logic [$clog2(NROWS+1)-1:0] n_pix,
  output logic [$clog2(NROWS+1)-1:0] n_hits,
  output logic [$clog2(NROWS*PIX_BITS+1)-1:0] n_bits
);

  localparam int unsigned PW = $clog2(NROWS+1);
  logic [$clog2(PIX_BITS)-1:0] bit_idx;

  assign done = (n_pix == PW'(NROWS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_idx <= '0;
      n_pix   <= '0;
      n_hits  <= '0;
      n_bits  <= '0;
    end else if (clear) begin
      bit_idx <= '0;
      n_pix   <= '0;
      n_hits  <= '0;
      n_bits  <= '0;
    end else if (shift && !done) begin
      n_bits <= n_bits + 1'b1;
      if (bit_idx == 0) begin
        if (bit_in) n_hits <= n_hits + 1'b1;
        if (compress && !bit_in) n_pix <= n_pix + 1'b1;
        else                     bit_idx <= 1;
      end else if (bit_idx == $bits(bit_idx)'(PIX_BITS-1)) begin
        bit_idx <= '0;
        n_pix   <= n_pix + 1'b1;
      end else begin
        bit_idx <= bit_idx + 1'b1;
      end
    end
  end

endmodule
