// sort_asic: selects the four largest of eight ranked trigger objects.
//
// The eight operands (6-bit rank + 4-bit tag) are shifted in four at a time
// over two 160 MHz cycles: the cycle with first = 1 carries operands 0..3,
// the next one operands 4..7. The Register/DeMux stage assembles the eight,
// the MAX4 block (sort_max4) leaves the four largest in its left group, and a
// 2:1 multiplexer chooses between that result and the unsorted first four
// operands (sel = 1, sampled in the group's second cycle), ahead of the
// output register.
//
// Timing: with operands 0..3 in cycle 0 and 4..7 in cycle 1, the result is on
// top4 from cycle 4 (demux register in cycle 2, MAX4 pipeline register in
// cycle 3, output register in cycle 4) and held until the next result, two cycles later at the
// earliest; top4_stb is high in the cycle it changes. With sel = 1 the four
// bypassed operands take the same path length.
// The two-cycle input, the rotation algorithm and the multiplexer follow the
// trigger design. The tag field, the content of the bypass side and the
// pipeline registers are this design's choices.
module sort_asic
  import rct_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     first,
  input  sort_op_t op_in [4],
  input  logic     sel,
  output sort_op_t top4  [4],
  output logic     top4_stb
);

  sort_op_t grp_a [4];
  sort_op_t d8    [8];
  sort_op_t byp_q [4];
  logic     d8_v, mid_v, sel_d8, sel_q;
  sort_op_t max4  [4];

  // Register/DeMux
  always_ff @(posedge clk) begin
    if (rst) begin
      grp_a <= '{default: '0};
      d8    <= '{default: '0};
      d8_v  <= 1'b0;
      sel_d8 <= 1'b0;
    end else begin
      d8_v <= 1'b0;
      if (first) grp_a <= op_in;
      else begin
        d8   <= '{grp_a[0], grp_a[1], grp_a[2], grp_a[3], op_in[0], op_in[1], op_in[2], op_in[3]};
        d8_v <= 1'b1;
        sel_d8 <= sel;
      end
    end
  end

  sort_max4 u_max4 (.clk, .rst, .d8, .top4 (max4));

  // keep the bypass side in step with the MAX4 pipeline register
  always_ff @(posedge clk)
    if (rst) begin
      byp_q <= '{default: '0};
      mid_v <= 1'b0;
      sel_q <= 1'b0;
    end else begin
      byp_q <= '{d8[0], d8[1], d8[2], d8[3]};
      mid_v <= d8_v;
      sel_q <= sel_d8;
    end

  // 2:1 multiplexer and output register
  always_ff @(posedge clk)
    if (rst) begin
      top4     <= '{default: '0};
      top4_stb <= 1'b0;
    end else begin
      top4_stb <= mid_v;
      if (mid_v) top4 <= sel_q ? byp_q : max4;
    end

endmodule
