// rct_slice: one 4 x 4 tower region of a regional calorimeter trigger crate,
// from the serial links to the ranked electron/photon candidates.
//
// Data path, per 25 ns crossing (four 160 MHz slots):
//   8 serial links (2 towers each) -> two Phase ASICs -> 4 towers per slot,
//   one row of the 4 x 4 region (columns A,B from Phase ASIC 0, C,D from
//   Phase ASIC 1) -> receiver LUTs (7-bit e/gamma energy + veto, 10-bit E_T)
//   -> Isolation ASIC (largest two-tower sum of the region, 12-cycle latency)
//   -> Sort ASIC (four largest of this candidate and seven from other cards).
// In parallel the row's four linear E_T values and four external operands
// (for example the matching hadron towers) go through an Adder ASIC in master
// mode, the e/gamma towers and their 3-bit corner reductions leave through a
// Boundary Scan ASIC, and the Phase ASICs' per-link error flags are counted
// per crossing. The four JTAG TAPs form one chain: tdi -> Phase ASIC 0 ->
// Phase ASIC 1 -> Adder ASIC -> Boundary Scan ASIC -> tdo (chain order is
// this design's choice).
//
// Slot timing: a 2-bit slot counter, reset with rst160 and started together
// with the 120 MHz crossing counter of the Phase ASICs, drives their slot
// select. A tower of slot s reaches the LUT outputs two cycles later, so the
// Isolation ASIC's first row comes when slot == 2. Its candidate then changes
// in slot 2 as well, which is where the Sort ASIC's first input cycle is put
// (the Sort ASIC runs every two cycles, slot 0 and slot 2 starting a group).
// Clocks and resets: rx_clk/rx_rst (recovered receiver clock), clk120/rst120
// and clk160/rst160, all synchronous resets; trst_n for JTAG.
// The chain of ASICs follows the crate design of the trigger; the column
// mapping of links to towers, the rank taken from a candidate, the extra
// adder operands and the glue timing are this design's choices.
module rct_slice
  import rct_pkg::*;
(
  input  logic       rx_clk,
  input  logic       rx_rst,
  input  logic       clk120,
  input  logic       rst120,
  input  logic       clk160,
  input  logic       rst160,
  // serial receiver channels
  input  link_word_t link_in [8],
  // Phase ASIC counter test mode
  input  logic       test_mode,
  input  logic       cnt_clr,
  input  logic       cnt_en,
  output err_word_t  err_out [2],
  // LUT loading
  input  logic       lut_we,
  input  logic [7:0] lut_waddr,
  input  logic [16:0] lut_wdata,
  // neighbour towers from adjacent regions, same slot timing as the LUT outputs
  input  eg_t        te_in [4],
  input  eg_t        be_in [4],
  input  eg_t        le_in,
  input  eg_t        re_in,
  output pair_t      iso_cand,
  output logic       iso_cand_stb,
  // Adder ASIC
  input  add_op_t    add_ext [4],
  input  logic       add_bypass,
  input  logic [2:0] add_byp_sel,
  output add_op_t    row_sum,
  // Sort ASIC
  input  sort_op_t   sort_ext [7],
  input  logic       sort_sel,
  output sort_op_t   top4 [4],
  output logic       top4_stb,
  // Boundary Scan ASIC
  output logic [7:0] link_tower_out [4],
  output logic [2:0] corner_out [4],
  input  logic       tck,
  input  logic       trst_n,
  input  logic       tms,
  input  logic       tdi,
  output logic       tdo,
  // link error counters
  input  logic       errcnt_clr,
  input  logic [2:0] errcnt_sel,
  output logic [15:0] errcnt_data
);

  // ---------------------------------------------------------- slot counter
  logic [1:0] slot;
  always_ff @(posedge clk160)
    if (rst160) slot <= 2'd0;
    else        slot <= slot + 2'd1;

  // ----------------------------------------------------------- Phase ASICs
  // JTAG chain: tdi -> Phase ASIC 0 -> Phase ASIC 1 -> Adder -> Boundary Scan -> tdo
  logic [2:0] tdo_c;
  tower_t     dout [4];     // columns A..D
  logic [3:0] link_err [2];
  for (genvar p = 0; p < 2; p++) begin : g_phase
    phase_asic u_phase (
      .rx_clk, .rx_rst, .clk120, .rst120, .clk160, .rst160,
      .d_in ('{link_in[4*p], link_in[4*p+1], link_in[4*p+2], link_in[4*p+3]}),
      .sel (slot), .test_mode, .cnt_clr, .cnt_en,
      .dout_a (dout[2*p]), .dout_b (dout[2*p+1]), .err_out (err_out[p]),
      .link_err (link_err[p]),
      .tck, .trst_n, .tms, .tdi (p == 0 ? tdi : tdo_c[0]), .tdo (tdo_c[p])
    );
  end

  link_error_counter #(.NLINK (8), .CNT_W (16)) u_errcnt (
    .clk (clk160), .rst (rst160), .stb (slot == 2'd0),
    .err ({link_err[1], link_err[0]}), .clr (errcnt_clr),
    .rd_sel (errcnt_sel), .rd_data (errcnt_data)
  );

  // ------------------------------------------------------ receiver LUTs
  eg_t        eg [4];
  logic [9:0] et [4];
  rx_lut #(.NPORT (4), .ET_W (10)) u_lut (
    .clk (clk160), .we (lut_we), .waddr (lut_waddr), .wdata (lut_wdata),
    .tower_in (dout), .eg_out (eg), .et_out (et)
  );

  // ------------------------------------------------------ Isolation ASIC
  isolation_asic u_iso (
    .clk (clk160), .rst (rst160), .cyc1 (slot == 2'd2),
    .ref_in (eg), .te_in, .be_in, .le_in, .re_in,
    .cand (iso_cand), .cand_stb (iso_cand_stb)
  );

  // ---------------------------------------------------------- Adder ASIC
  add_op_t add_in [8];
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      add_in[i]     = '{aov: 1'b0, tov: 1'b0, val: {1'b0, et[i]}};
      add_in[4 + i] = add_ext[i];
    end
  end
  adder_asic u_add (
    .clk (clk160), .rst (rst160), .master (1'b1), .bypass (add_bypass),
    .byp_sel (add_byp_sel), .op_in (add_in), .sum_out (row_sum),
    .tck, .trst_n, .tms, .tdi (tdo_c[1]), .tdo (tdo_c[2])
  );

  // ----------------------------------------------------------- Sort ASIC
  sort_op_t cand_op;
  sort_op_t sort_in [4];
  logic     sort_first;
  assign cand_op    = '{rank: iso_cand.sum[7:2], tag: {iso_cand.veto_ref, iso_cand.veto_nbr, 2'b00}};
  assign sort_first = ~slot[0];
  always_comb
    if (sort_first) sort_in = '{cand_op, sort_ext[0], sort_ext[1], sort_ext[2]};
    else            sort_in = '{sort_ext[3], sort_ext[4], sort_ext[5], sort_ext[6]};
  sort_asic u_sort (
    .clk (clk160), .rst (rst160), .first (sort_first), .op_in (sort_in),
    .sel (sort_sel), .top4, .top4_stb
  );

  // --------------------------------------------------- Boundary Scan ASIC
  logic [7:0] eg_bits [4];
  logic [6:0] eg_e [4];
  always_comb
    for (int i = 0; i < 4; i++) begin
      eg_bits[i] = eg[i];
      eg_e[i]    = eg[i].e;
    end
  bscan_asic #(.N_PASS (4), .PASS_W (8), .N_CORNER (4)) u_bsc (
    .clk (clk160), .rst (rst160), .pass_in (eg_bits), .corner_in (eg_e),
    .pass_out (link_tower_out), .corner_out, .tck, .trst_n, .tms, .tdi (tdo_c[2]), .tdo
  );

endmodule
