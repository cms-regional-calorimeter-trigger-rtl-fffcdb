// isolation_asic: electron/photon candidate finder for one 4 x 4 tower region.
//
// Every 6.25 ns the chip takes one row of four e/gamma towers (columns A..D,
// 7-bit energy + veto bit) plus the left and right edge neighbours of that
// row; the top-edge neighbours come with the first row of a crossing and the
// bottom-edge neighbours with the last. Three blocks process the data:
//   input staging   one iso_input_staging per column lines up each reference
//                   tower with its top and bottom neighbours;
//   add/compare     per column, the sums of the reference with its left,
//                   bottom, top and right neighbours, each enabled only when
//                   the reference is at least as large as the neighbour;
//   find max        per column, the largest of the four sums (two levels).
// A final stage takes the maximum over the four columns (two levels) and then
// over the four rows of the crossing, and puts the largest two-tower sum of
// the region, with its veto bits, on the output.
//
// Interface: cyc1 marks the cycle that carries row 0 (the crossing's first
// 160 MHz cycle). ref_in[0..3] = columns A..D, te_in/be_in the edge
// neighbours of each column, le_in/re_in the left/right neighbours of the
// current row. cand is updated once per crossing; cand_stb is high in the
// cycle it changes.
// Timing: cand for the crossing whose row 0 came in cycle 0 is valid from
// cycle 12 (12 x 6.25 ns = 3 crossings), the latency the trigger design gives.
// The three blocks, the neighbour order and the comparison rule follow the
// trigger design. The register split of the final stage (chosen to reach
// that latency) and the tie rule (first found wins) are this design's.
module isolation_asic
  import rct_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  cyc1,
  input  eg_t   ref_in [4],
  input  eg_t   te_in  [4],
  input  eg_t   be_in  [4],
  input  eg_t   le_in,
  input  eg_t   re_in,
  output pair_t cand,
  output logic  cand_stb
);

  // crossing phase of the current input row
  logic [1:0] ph_prev, ph_in;
  assign ph_in = cyc1 ? 2'd0 : ph_prev + 2'd1;
  always_ff @(posedge clk)
    if (rst) ph_prev <= 2'd3;
    else     ph_prev <= ph_in;

  // pipeline fill: no candidate is flagged before the first crossing is through
  logic [3:0] fill;
  logic       filled;
  assign filled = (fill == 4'd11);
  always_ff @(posedge clk)
    if (rst)                        fill <= '0;
    else if (!filled && (cyc1 || fill != '0)) fill <= fill + 4'd1;

  // ------------------------------------------------------ input staging
  eg_t        top [4], rf [4], bot [4];
  logic [1:0] ph_w [4];
  for (genvar c = 0; c < 4; c++) begin : g_stage
    iso_input_staging u_st (
      .clk, .rst, .ph_in, .x_in (ref_in[c]), .te_in (te_in[c]), .be_in (be_in[c]),
      .top (top[c]), .ref_t (rf[c]), .bot (bot[c]), .ph_out (ph_w[c])
    );
  end

  // left/right edge neighbours: same three-cycle delay as the reference
  eg_t le_q [3], re_q [3];
  always_ff @(posedge clk)
    if (rst) begin
      le_q <= '{default: '0};
      re_q <= '{default: '0};
    end else begin
      le_q <= '{le_in, le_q[0], le_q[1]};
      re_q <= '{re_in, re_q[0], re_q[1]};
    end

  // --------------------------------------------------- add/compare, max
  pair_t sums [4][4];
  pair_t cmax [4];
  for (genvar c = 0; c < 4; c++) begin : g_col
    eg_t nbr [4];
    assign nbr[0] = (c == 0) ? le_q[2] : rf[(c == 0) ? 0 : c - 1];  // left
    assign nbr[1] = bot[c];                                           // bottom
    assign nbr[2] = top[c];                                           // top
    assign nbr[3] = (c == 3) ? re_q[2] : rf[(c == 3) ? 3 : c + 1];  // right
    iso_add_compare u_ac (.clk, .rst, .ref_t (rf[c]), .nbr (nbr), .sums (sums[c]));
    iso_find_max    u_fm (.clk, .rst, .sums (sums[c]), .max_o (cmax[c]));
  end

  // --------------------------------------------- final sort over 16 maxima
  logic [1:0] ph_d [5];   // row of the data in: sums, m01, cmax, f1, f2
  pair_t f1 [2];
  pair_t f2, acc;
  always_ff @(posedge clk) begin
    if (rst) begin
      ph_d     <= '{default: '0};
      f1       <= '{default: '0};
      f2       <= '0;
      acc      <= '0;
      cand     <= '0;
      cand_stb <= 1'b0;
    end else begin
      ph_d  <= '{ph_w[0], ph_d[0], ph_d[1], ph_d[2], ph_d[3]};
      f1[0] <= (cmax[1].sum > cmax[0].sum) ? cmax[1] : cmax[0];
      f1[1] <= (cmax[3].sum > cmax[2].sum) ? cmax[3] : cmax[2];
      f2    <= (f1[1].sum > f1[0].sum) ? f1[1] : f1[0];
      cand_stb <= 1'b0;
      unique case (ph_d[4])
        2'd0:    acc <= f2;
        2'd3: begin
          cand     <= (f2.sum > acc.sum) ? f2 : acc;
          cand_stb <= filled;
        end
        default: if (f2.sum > acc.sum) acc <= f2;
      endcase
    end
  end

endmodule
