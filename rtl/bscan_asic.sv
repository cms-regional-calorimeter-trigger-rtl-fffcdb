// bscan_asic: boundary-scan and link-driver ASIC.
//
// The chip sits where tower data leave a card over the backplane or the
// inter-crate cables. It registers and drives the outgoing data and applies
// simple data reductions on the way: corner-tower energies are cut from 7 to
// 3 bits, with any of the upper four bits set saturating the 3-bit scale to
// 3'b111. It also hosts a JTAG TAP whose boundary-scan cells cover its data
// inputs and outputs, for board-level boundary-scan tests of the links.
//
// Interface: clk/rst (160 MHz); N_PASS words of PASS_W bits are driven
// unchanged, N_CORNER 7-bit corner energies are reduced; both are registered
// once (one cycle latency) and then pass the output scan cells. JTAG pins
// tck/tms/tdi/trst_n/tdo.
// The three functions and the saturating 7-to-3-bit reduction follow the
// trigger design; which 3 bits are kept (the low ones), the numbers of words
// and the single register stage are this design's choices. The electrical
// line drivers themselves are outside this logic.
module bscan_asic
  import rct_pkg::*;
#(
  parameter int unsigned N_PASS   = 4,
  parameter int unsigned PASS_W   = 8,
  parameter int unsigned N_CORNER = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [PASS_W-1:0] pass_in    [N_PASS],
  input  logic [6:0]        corner_in  [N_CORNER],
  output logic [PASS_W-1:0] pass_out   [N_PASS],
  output logic [2:0]        corner_out [N_CORNER],
  input  logic              tck,
  input  logic              trst_n,
  input  logic              tms,
  input  logic              tdi,
  output logic              tdo
);
  localparam int unsigned NI = N_PASS * PASS_W + N_CORNER * 7;
  localparam int unsigned NO = N_PASS * PASS_W + N_CORNER * 3;

  logic [PASS_W-1:0] pass_q   [N_PASS];
  logic [2:0]        corner_q [N_CORNER];

  always_ff @(posedge clk)
    if (rst) begin
      pass_q   <= '{default: '0};
      corner_q <= '{default: '0};
    end else begin
      pass_q <= pass_in;
      for (int i = 0; i < N_CORNER; i++) corner_q[i] <= corner_reduce(corner_in[i]);
    end

  // pins seen by the boundary-scan register
  logic [NI-1:0] pins_i;
  logic [NO-1:0] core_o, pins_o;
  always_comb begin
    for (int i = 0; i < N_PASS; i++) begin
      pins_i[i*PASS_W +: PASS_W] = pass_in[i];
      core_o[i*PASS_W +: PASS_W] = pass_q[i];
    end
    for (int i = 0; i < N_CORNER; i++) begin
      pins_i[N_PASS*PASS_W + i*7 +: 7] = corner_in[i];
      core_o[N_PASS*PASS_W + i*3 +: 3] = corner_q[i];
    end
  end

  logic extest;
  jtag_tap #(.N_IN (NI), .N_OUT (NO)) u_tap (
    .tck, .trst_n, .tms, .tdi, .tdo,
    .pin_in (pins_i), .core_out (core_o), .pin_out (pins_o), .extest
  );

  always_comb begin
    for (int i = 0; i < N_PASS; i++)   pass_out[i]   = pins_o[i*PASS_W +: PASS_W];
    for (int i = 0; i < N_CORNER; i++) corner_out[i] = pins_o[N_PASS*PASS_W + i*3 +: 3];
  end

  logic unused;
  assign unused = extest;

endmodule
