// rx_lut: receiver-card look-up table that linearises tower energies.
//
// The front end sends each tower energy on an 8-bit compressed (non-linear)
// scale. One table, addressed by that code, gives two linear energies: a
// 7-bit energy for electron/photon identification and a 10-bit transverse
// energy for the energy sums. The tower's fine-grain bit is passed alongside
// as the veto bit of the e/gamma energy.
//
// Interface: NPORT read ports, each registered (one cycle latency) with the
// fine-grain bit delayed to match; one synchronous write port (we/waddr/
// wdata, wdata = {eg[6:0], et[9:0]}) through which the crate controller loads
// the table. The content is not reset; it must be loaded before use.
// That the table linearises the energy into the widths needed by each trigger
// follows the trigger design; the 10-bit sum width, the shared table for both
// outputs and the use of the fine-grain bit as veto are this design's choices.
module rx_lut
  import rct_pkg::*;
#(
  parameter int unsigned NPORT = 4,
  parameter int unsigned ET_W  = 10
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [7:0]           waddr,
  input  logic [EG_W+ET_W-1:0] wdata,
  input  tower_t               tower_in [NPORT],
  output eg_t                  eg_out   [NPORT],
  output logic [ET_W-1:0]      et_out   [NPORT]
);
  logic [EG_W+ET_W-1:0] mem [256];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    for (int p = 0; p < NPORT; p++) begin
      {eg_out[p].e, et_out[p]} <= mem[tower_in[p].et];
      eg_out[p].veto           <= tower_in[p].fg;
    end
  end
endmodule
