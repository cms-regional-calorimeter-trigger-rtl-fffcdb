// adder_asic: pipelined sum of eight 11-bit signed operands with overflow flags.
//
// Each 13-bit operand is {AOV, TOV, value[10:0]}: an 11-bit two's complement
// value, a tower-overflow flag (TOV) and an arithmetic-overflow flag (AOV).
// The sum is formed by a three-level adder tree (4 + 2 + 1 adders). Every
// adder is 12 bits wide with the 11 value bits left justified and the LSB tied
// to zero, so the top bit is the sign and a signed overflow of the 12-bit add
// is an arithmetic overflow of the 11-bit sum (the sum wraps).
//
// TOV: a chip in the top rank of an adder tree (master = 1) generates TOV for
// an input whose value is at positive full scale as well as taking the
// operand's TOV bit; a slave only propagates the TOV bits. All eight input TOV
// bits are ORed in the first stage and then passed from register to register.
// AOV: every stage ORs the overflow of its own adders into the AOV coming from
// the previous stage; the first stage also takes the inputs' AOV bits.
//
// Pipeline: input register, three adder-tree stages, each registered: the sum
// of operands presented before a rising edge is on sum_out after the fourth
// rising edge, counting that one (4 x 6.25 ns = one 25 ns crossing). The output goes through a 2:1 mux whose
// other side is an 8:1 mux passing the registered input operand byp_sel with
// its two flag bits cleared (bypass = 1; latency 1).
// A JTAG TAP (jtag_tap) puts scan cells on the 13 output pins after the 2:1
// mux and capture-only cells on the 109 input pins (op_in, operand 0 nearest
// TDO, then master, bypass, byp_sel); after TAP reset sum_out is functional.
// Tree shape, adder width, the output scan cells, TOV/AOV rules, pipeline depth and the bypass mux
// follow the trigger design; the input scan cells, generating TOV from a full-scale input in master
// mode and taking the bypass from the input register are this design's choices.
module adder_asic
  import rct_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       master,
  input  logic       bypass,
  input  logic [2:0] byp_sel,
  input  add_op_t    op_in [8],
  output add_op_t    sum_out,
  input  logic       tck,
  input  logic       trst_n,
  input  logic       tms,
  input  logic       tdi,
  output logic       tdo
);

  localparam logic [ADD_W-1:0] FULL_SCALE = {1'b0, {(ADD_W-1){1'b1}}};

  typedef struct packed {
    logic [ADD_W-1:0] s;
    logic             ovf;
  } add_res_t;

  // one 12-bit adder: 11 bits left justified, LSB zero
  function automatic add_res_t add12(input logic [ADD_W-1:0] a, input logic [ADD_W-1:0] b);
    logic [ADD_W:0] x, y, z;
    x = {a, 1'b0};
    y = {b, 1'b0};
    z = x + y;
    return '{s: z[ADD_W:1], ovf: (x[ADD_W] == y[ADD_W]) && (z[ADD_W] != x[ADD_W])};
  endfunction

  add_op_t          op_q [8];
  logic [ADD_W-1:0] s1 [4];
  logic [ADD_W-1:0] s2 [2];
  logic [ADD_W-1:0] s3;
  logic             tov1, tov2, tov3, aov1, aov2, aov3;

  // stage 0: input register
  always_ff @(posedge clk)
    if (rst) for (int i = 0; i < 8; i++) op_q[i] <= '0;
    else     op_q <= op_in;

  // stage 1: four adders, TOV generate/propagate, AOV generate/propagate
  add_res_t r1 [4];
  logic     tov_in, aov_in;
  always_comb begin
    tov_in = 1'b0;
    aov_in = 1'b0;
    for (int i = 0; i < 8; i++) begin
      tov_in |= op_q[i].tov | (master && op_q[i].val == FULL_SCALE);
      aov_in |= op_q[i].aov;
    end
    for (int i = 0; i < 4; i++) r1[i] = add12(op_q[2*i].val, op_q[2*i+1].val);
  end

  // stage 2 and 3 adders
  add_res_t r2 [2];
  add_res_t r3;
  always_comb begin
    for (int i = 0; i < 2; i++) r2[i] = add12(s1[2*i], s1[2*i+1]);
    r3 = add12(s2[0], s2[1]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s1 <= '{default: '0};
      s2 <= '{default: '0};
      s3 <= '0;
      {tov1, tov2, tov3, aov1, aov2, aov3} <= '0;
    end else begin
      for (int i = 0; i < 4; i++) s1[i] <= r1[i].s;
      tov1 <= tov_in;
      aov1 <= aov_in | r1[0].ovf | r1[1].ovf | r1[2].ovf | r1[3].ovf;
      for (int i = 0; i < 2; i++) s2[i] <= r2[i].s;
      tov2 <= tov1;
      aov2 <= aov1 | r2[0].ovf | r2[1].ovf;
      s3   <= r3.s;
      tov3 <= tov2;
      aov3 <= aov2 | r3.ovf;
    end
  end

  // output 2:1 mux, bypass side fed by an 8:1 operand mux
  add_op_t mux_out;
  always_comb
    if (bypass) mux_out = '{aov: 1'b0, tov: 1'b0, val: op_q[byp_sel].val};
    else        mux_out = '{aov: aov3, tov: tov3, val: s3};


  // boundary scan: output cells between the 2:1 mux and the pads, capture-only
  // cells on the input pins
  localparam int unsigned NI = 8 * 13 + 5;
  localparam int unsigned NO = 13;
  logic [NI-1:0] pins_i;
  logic [NO-1:0] pins_o;
  logic          extest;
  always_comb begin
    for (int i = 0; i < 8; i++) pins_i[i*13 +: 13] = op_in[i];
    pins_i[NI-1 -: 5] = {byp_sel, bypass, master};
  end
  assign sum_out = pins_o;

  jtag_tap #(.N_IN (NI), .N_OUT (NO)) u_tap (
    .tck, .trst_n, .tms, .tdi, .tdo,
    .pin_in (pins_i), .core_out (mux_out), .pin_out (pins_o), .extest
  );

  logic unused;
  assign unused = extest;

endmodule
