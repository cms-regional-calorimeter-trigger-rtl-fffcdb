// sort_max4: the four largest of eight operands by rotation of compared pairs.
//
// The operands form a left group L[0..3] and a right group R[0..3]. In each
// of four stages L[i] is compared with R[i] and the larger of the two moves
// to (or stays in) L[i], the smaller to R[i]; between stages the right group
// is rotated by one position. After the fourth stage the left group holds the
// four largest operands, in no particular order. Only the rank field is
// compared; on equal ranks the left operand stays.
//
// Interface: d8[0..3] = left group, d8[4..7] = right group; top4 = left group
// after stage 4. Stages 1-2 and 3-4 are separated by a register: two cycles
// latency. The algorithm follows the trigger design; the pipeline split is
// this design's.
module sort_max4
  import rct_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  sort_op_t d8   [8],
  output sort_op_t top4 [4]
);

  // v[0..3] = left group, v[4..7] = right group
  typedef sort_op_t [7:0] grp8_t;

  // compare-exchange between the groups, then rotate the right group
  function automatic grp8_t stage(input grp8_t v, input bit rotate);
    grp8_t o;
    for (int i = 0; i < 4; i++)
      if (v[4+i].rank > v[i].rank) begin
        o[i]   = v[4+i];
        o[4+i] = v[i];
      end else begin
        o[i]   = v[i];
        o[4+i] = v[4+i];
      end
    if (rotate) o[7:4] = {o[4], o[7], o[6], o[5]};  // new R[i] = old R[i+1]
    return o;
  endfunction

  grp8_t v_in, v_mid, v_q, v_out;

  always_comb begin
    for (int i = 0; i < 8; i++) v_in[i] = d8[i];
    v_mid = stage(stage(v_in, 1'b1), 1'b1);
  end

  always_ff @(posedge clk)
    if (rst) v_q <= '0;
    else     v_q <= v_mid;

  always_comb begin
    v_out = stage(stage(v_q, 1'b1), 1'b0);
    for (int i = 0; i < 4; i++) top4[i] = v_out[i];
  end

  // the right group after stage 4 holds the four smallest: not an output
  logic unused;
  assign unused = ^v_out[7:4];

endmodule
