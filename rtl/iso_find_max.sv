// iso_find_max: maximum of the four two-tower sums of one reference tower.
//
// Two comparators pick the larger of sums 0/1 and of sums 2/3; the two winners
// are registered and compared again in the next cycle; the overall maximum is
// registered with its veto bits. A later sum replaces an earlier one only if
// it is strictly larger, so ties go to the lower index.
//
// Interface: four pair_t in, one pair_t out, two cycles latency.
// The two-level structure follows the trigger design; the tie rule is this
// design's.
module iso_find_max
  import rct_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  pair_t sums [4],
  output pair_t max_o
);
  pair_t m01, m23;
  always_ff @(posedge clk) begin
    if (rst) begin
      m01   <= '0;
      m23   <= '0;
      max_o <= '0;
    end else begin
      m01   <= (sums[1].sum > sums[0].sum) ? sums[1] : sums[0];
      m23   <= (sums[3].sum > sums[2].sum) ? sums[3] : sums[2];
      max_o <= (m23.sum > m01.sum) ? m23 : m01;
    end
  end
endmodule
