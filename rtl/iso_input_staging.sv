// iso_input_staging: input staging for one column of the 4 x 4 tower array.
//
// The four reference towers of a column arrive one per 6.25 ns cycle, top row
// first (phase 0..3 of a crossing). The top-edge neighbour (from the adjacent
// region) comes with the first row and the bottom-edge neighbour with the
// last row. A short chain of registers delays the column so that each
// reference tower leaves together with its top and bottom neighbours:
//
//   window of row 0:  top = top edge,   ref = row 0, bot = row 1
//   window of row 3:  top = row 2,      ref = row 3, bot = bottom edge
//
// Interface: x_in is the tower of the current row, te_in/be_in are sampled
// when ph_in is 0 and 3 respectively; top/ref_t/bot and ph_out (the row of
// ref_t) are registered. Row r presented in cycle c is on ref_t in cycle c+3
// (row 3 waits for the first row of the next crossing, as the bottom edge is
// placed into the bottom register during cycle 1 of the next sequence).
// The register-and-mux structure follows the trigger design; the exact
// register count is this design's.
module iso_input_staging
  import rct_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] ph_in,
  input  eg_t        x_in,
  input  eg_t        te_in,
  input  eg_t        be_in,
  output eg_t        top,
  output eg_t        ref_t,
  output eg_t        bot,
  output logic [1:0] ph_out
);
  eg_t        x_q, d1, d2, te_hold, be_hold;
  logic [1:0] ph_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      {x_q, d1, d2, te_hold, be_hold, top, ref_t, bot} <= '0;
      ph_q   <= '0;
      ph_out <= '0;
    end else begin
      x_q  <= x_in;
      ph_q <= ph_in;
      d1   <= x_q;
      d2   <= d1;
      if (ph_in == 2'd0) te_hold <= te_in;
      if (ph_in == 2'd3) be_hold <= be_in;
      // x_q holds row ph_q; d1 the row before it, d2 the one before that
      top    <= (ph_q == 2'd1) ? te_hold : d2;
      ref_t  <= d1;
      bot    <= (ph_q == 2'd0) ? be_hold : x_q;
      ph_out <= ph_q - 2'd1;
    end
  end
endmodule
