// phase_asic: link receiver and synchroniser for four serial trigger links.
//
// Four channels of 11 bits (8 data bits, 2 status bits, 1 error bit) arrive
// from a 4-channel serial receiver on the receiver's recovered 120 MHz clock.
// A 44-bit elastic FIFO moves them onto the local 120 MHz clock; a phase
// controller per channel frames each link's three words into a 24-bit frame
// and aligns it to the local crossing; the 18 data bits are checked against
// the 5-bit Hamming code. The data leave at 160 MHz on two 9-bit tower
// channels and one 9-bit error channel, time multiplexed by the external
// select sel over the four 6.25 ns slots of a crossing:
//
//   slot (sel)   dout_a            dout_b            err_out
//   0            link 0 tower 0    link 2 tower 0    error word of link 0
//   1            link 0 tower 1    link 2 tower 1    error word of link 1
//   2            link 1 tower 0    link 3 tower 0    error word of link 2
//   3            link 1 tower 1    link 3 tower 1    error word of link 3
//
// The towers of a link with any error (Hamming mismatch, receiver error, link
// down) are zeroed so that a broken link does not stop data taking. The error
// word is {overall error, receiver error, status[1:0], received code[4:0]}.
//
// The output data registers are loadable counters: normally loaded every
// 160 MHz cycle, in test_mode they are cleared by cnt_clr and count up while
// cnt_en is high, and err_out is held at zero.
//
// Timing: the 160 MHz side copies the four phased frames in the cycle where
// sel == 3 and presents slot s one cycle after sel == s. The 120 MHz crossing
// counter starts at 0 when rst120 is released; sel must count 0..3 with slot 0
// starting together with that crossing. link_err gives per link the overall
// error of the frames currently being output.
// A JTAG TAP (jtag_tap) puts scan cells on all 27 output pins, between the
// output registers and the pads, and capture-only cells on the 49 input pins;
// after TAP reset the outputs are the functional ones. JTAG pins
// tck/tms/tdi/trst_n/tdo. Boundary-register order from TDO: d_in (link 0
// first), sel, test_mode, cnt_clr, cnt_en, dout_a, dout_b, err_out.
// The block structure, widths, zeroing, the counter test mode and the scan
// cells on the outputs follow the trigger design; the slot order, the error
// word layout and the scan cells on the inputs are this design's.
module phase_asic
  import rct_pkg::*;
(
  input  logic       rx_clk,
  input  logic       rx_rst,
  input  logic       clk120,
  input  logic       rst120,
  input  logic       clk160,
  input  logic       rst160,
  input  link_word_t d_in [4],
  input  logic [1:0] sel,
  input  logic       test_mode,
  input  logic       cnt_clr,
  input  logic       cnt_en,
  output tower_t     dout_a,
  output tower_t     dout_b,
  output err_word_t  err_out,
  output logic [3:0] link_err,
  input  logic       tck,
  input  logic       trst_n,
  input  logic       tms,
  input  logic       tdi,
  output logic       tdo
);

  // ---------------------------------------------------- receiver -> local
  logic [43:0] fifo_in, fifo_out;
  logic        fifo_valid;

  always_comb
    for (int c = 0; c < 4; c++) fifo_in[c*11 +: 11] = d_in[c];

  phase_fifo #(.WIDTH(44), .DEPTH(18)) u_fifo (
    .wr_clk (rx_clk), .wr_rst (rx_rst), .wdata (fifo_in),
    .rd_clk (clk120), .rd_rst (rst120), .rdata (fifo_out), .rvalid (fifo_valid)
  );

  // ------------------------------------------------ 120 MHz crossing phase
  logic [1:0] bx_ph;
  always_ff @(posedge clk120)
    if (rst120) bx_ph <= '0;
    else        bx_ph <= (bx_ph == 2'd2) ? 2'd0 : bx_ph + 2'd1;

  frame_t frame [4];
  for (genvar c = 0; c < 4; c++) begin : g_ch
    phase_cntrl u_pc (
      .clk (clk120), .rst (rst120),
      .word (link_word_t'(fifo_out[c*11 +: 11])), .valid (fifo_valid),
      .bx_ph (bx_ph), .frame_out (frame[c])
    );
  end

  // -------------------------------------------------------- 160 MHz side
  frame_t hold [4];
  always_ff @(posedge clk160)
    if (rst160) begin
      for (int c = 0; c < 4; c++) hold[c] <= '{status: ST_SETUP, down: 1'b1, default: '0};
    end else if (sel == 2'd3) begin
      hold <= frame;
    end

  logic [EDC_W-1:0] syn  [4];
  logic [EDC_W-1:0] calc [4];
  logic [3:0]       mism;
  err_word_t        errw [4];
  tower_t           tw   [8];   // towers 0..7 = link0 t0, link0 t1, link1 t0, ...

  for (genvar c = 0; c < 4; c++) begin : g_edc
    edc_check u_edc (
      .data ({hold[c].t1, hold[c].t0}), .edc_rx (hold[c].edc),
      .edc_calc (calc[c]), .syndrome (syn[c]), .mismatch (mism[c])
    );
    assign link_err[c]    = mism[c] | hold[c].rx_err | hold[c].down;
    assign errw[c]        = '{any_err: link_err[c], rx_err: hold[c].rx_err,
                              status: hold[c].status, edc: hold[c].edc};
    assign tw[2*c]        = link_err[c] ? '0 : hold[c].t0;
    assign tw[2*c+1]      = link_err[c] ? '0 : hold[c].t1;
  end

  // output registers: loadable counters
  tower_t    dout_a_q, dout_b_q;
  err_word_t err_out_q;

  always_ff @(posedge clk160) begin
    if (rst160) begin
      dout_a_q  <= '0;
      dout_b_q  <= '0;
      err_out_q <= '0;
    end else if (test_mode) begin
      err_out_q <= '0;
      if (cnt_clr) begin
        dout_a_q <= '0;
        dout_b_q <= '0;
      end else if (cnt_en) begin
        dout_a_q <= dout_a_q + 1'b1;
        dout_b_q <= dout_b_q + 1'b1;
      end
    end else begin
      dout_a_q  <= tw[{1'b0, sel}];
      dout_b_q  <= tw[{1'b1, sel}];
      err_out_q <= errw[sel];
    end
  end

  // boundary scan: input cells capture the pins, output cells sit between
  // the output registers and the pads
  localparam int unsigned NI = 4 * 11 + 2 + 3;
  localparam int unsigned NO = 3 * 9;
  logic [NI-1:0] pins_i;
  logic [NO-1:0] core_o, pins_o;
  logic          extest;
  assign pins_i = {cnt_en, cnt_clr, test_mode, sel, fifo_in};
  assign core_o = {err_out_q, dout_b_q, dout_a_q};
  assign {err_out, dout_b, dout_a} = pins_o;

  jtag_tap #(.N_IN (NI), .N_OUT (NO)) u_tap (
    .tck, .trst_n, .tms, .tdi, .tdo,
    .pin_in (pins_i), .core_out (core_o), .pin_out (pins_o), .extest
  );

  // unused: recomputed code and syndrome are only needed for the flag
  logic unused;
  assign unused = ^{extest, calc[0], calc[1], calc[2], calc[3], syn[0], syn[1], syn[2], syn[3]};

endmodule
