// iso_add_compare: two-tower sums around one reference tower.
//
// Forms the four sums of the reference tower with its left, bottom, top and
// right neighbours. In parallel each pair is compared; a sum is passed on only
// when the reference energy is larger than or equal to the neighbour energy,
// otherwise zero is passed. Each sum carries the veto bits of the reference
// and the neighbour (both cleared with a disabled sum).
//
// Interface: 7-bit energies with veto bits in; four pair_t out, registered,
// one cycle latency; in order left, bottom, top, right. The sums and the
// comparison rule follow the trigger design; carrying both veto bits is this
// design's reading of "the veto bits are stored with each sum".
module iso_add_compare
  import rct_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  eg_t   ref_t,
  input  eg_t   nbr [4],
  output pair_t sums [4]
);
  always_ff @(posedge clk)
    for (int i = 0; i < 4; i++)
      if (rst || ref_t.e < nbr[i].e) sums[i] <= '0;
      else sums[i] <= '{sum: {1'b0, ref_t.e} + {1'b0, nbr[i].e},
                        veto_ref: ref_t.veto, veto_nbr: nbr[i].veto};
endmodule
