// jtag_tap: IEEE 1149.1 test access port with a boundary-scan register.
//
// The trigger ASICs carry a JTAG controller and scan cells on their pins so
// that board-level boundary scan can test the point-to-point links. This TAP
// has the standard 16-state controller, a 3-bit instruction register and
// three instructions:
//   EXTEST (3'b000)          the update stage of the output cells drives the
//                            output pins; capture samples inputs and outputs
//   SAMPLE/PRELOAD (3'b001)  capture and shift without disturbing the pins
//   BYPASS (3'b111, and every other code)  one-bit bypass register
// The boundary-scan register has N_IN input cells (capture only) followed by
// N_OUT output cells; bit 0 is nearest TDO. TDO changes on the falling edge of
// TCK. trst_n resets the controller asynchronously to Test-Logic-Reset, which
// selects BYPASS; five TCK cycles with TMS high do the same.
//
// Interface: tck/tms/tdi/trst_n/tdo; pin_in = values at the input cells;
// core_out = functional outputs; pin_out = what reaches the output pads.
// JTAG and boundary scan cells on the pins follow the trigger design; the
// instruction set and codes are this design's choice within the standard.
module jtag_tap #(
  parameter int unsigned N_IN  = 8,
  parameter int unsigned N_OUT = 8
) (
  input  logic             tck,
  input  logic             trst_n,
  input  logic             tms,
  input  logic             tdi,
  output logic             tdo,
  input  logic [N_IN-1:0]  pin_in,
  input  logic [N_OUT-1:0] core_out,
  output logic [N_OUT-1:0] pin_out,
  output logic             extest
);
  localparam int unsigned N = N_IN + N_OUT;
  localparam logic [2:0] I_EXTEST = 3'b000;
  localparam logic [2:0] I_SAMPLE = 3'b001;
  localparam logic [2:0] I_BYPASS = 3'b111;

  typedef enum logic [3:0] {
    TLR, RTI, SEL_DR, CAP_DR, SH_DR, EX1_DR, PAU_DR, EX2_DR, UPD_DR,
    SEL_IR, CAP_IR, SH_IR, EX1_IR, PAU_IR, EX2_IR, UPD_IR
  } tap_state_t;

  tap_state_t st, st_nx;

  always_comb begin
    unique case (st)
      TLR:    st_nx = tms ? TLR    : RTI;
      RTI:    st_nx = tms ? SEL_DR : RTI;
      SEL_DR: st_nx = tms ? SEL_IR : CAP_DR;
      CAP_DR: st_nx = tms ? EX1_DR : SH_DR;
      SH_DR:  st_nx = tms ? EX1_DR : SH_DR;
      EX1_DR: st_nx = tms ? UPD_DR : PAU_DR;
      PAU_DR: st_nx = tms ? EX2_DR : PAU_DR;
      EX2_DR: st_nx = tms ? UPD_DR : SH_DR;
      UPD_DR: st_nx = tms ? SEL_DR : RTI;
      SEL_IR: st_nx = tms ? TLR    : CAP_IR;
      CAP_IR: st_nx = tms ? EX1_IR : SH_IR;
      SH_IR:  st_nx = tms ? EX1_IR : SH_IR;
      EX1_IR: st_nx = tms ? UPD_IR : PAU_IR;
      PAU_IR: st_nx = tms ? EX2_IR : PAU_IR;
      EX2_IR: st_nx = tms ? UPD_IR : SH_IR;
      UPD_IR: st_nx = tms ? SEL_DR : RTI;
      default: st_nx = TLR;
    endcase
  end

  always_ff @(posedge tck or negedge trst_n)
    if (!trst_n) st <= TLR;
    else         st <= st_nx;

  logic [2:0]   ir_sh, ir;
  logic         byp;
  logic [N-1:0] bsr_sh;
  logic [N_OUT-1:0] upd;
  logic         sel_bsr;

  assign sel_bsr = (ir == I_EXTEST) || (ir == I_SAMPLE);
  assign extest  = (ir == I_EXTEST);

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      ir_sh  <= '0;
      ir     <= I_BYPASS;
      byp    <= 1'b0;
      bsr_sh <= '0;
      upd    <= '0;
    end else begin
      unique case (st)
        TLR:    ir <= I_BYPASS;
        CAP_IR: ir_sh <= 3'b001;
        SH_IR:  ir_sh <= {tdi, ir_sh[2:1]};
        UPD_IR: ir <= ir_sh;
        CAP_DR: if (sel_bsr) bsr_sh <= {core_out, pin_in};
                else         byp    <= 1'b0;
        SH_DR:  if (sel_bsr) bsr_sh <= {tdi, bsr_sh[N-1:1]};
                else         byp    <= tdi;
        UPD_DR: if (sel_bsr) upd <= bsr_sh[N-1:N_IN];
        default: ;
      endcase
    end
  end

  always_ff @(negedge tck or negedge trst_n)
    if (!trst_n)            tdo <= 1'b0;
    else if (st == SH_IR)   tdo <= ir_sh[0];
    else if (st == SH_DR)   tdo <= sel_bsr ? bsr_sh[0] : byp;

  assign pin_out = extest ? upd : core_out;

endmodule
