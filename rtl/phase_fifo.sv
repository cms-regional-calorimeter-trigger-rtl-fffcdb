// phase_fifo: elastic buffer between the serial receiver's recovered clock and
// the local 120 MHz clock of the Phase ASIC.
//
// Both clocks run at the same frequency but with an unknown and slowly
// wandering phase. The write side stores one word every receiver clock cycle
// into a circular buffer of DEPTH entries; the read side reads one word every
// local clock cycle from a read pointer that starts DEPTH/2 entries behind the
// write pointer. Neither pointer crosses clock domains: both sides count
// freely from their own reset, so a phase drift of up to about DEPTH/2 cycles
// either way is absorbed. Releasing both resets (resynchronising a link)
// re-centres the buffer.
//
// Interface: wr_clk/wr_rst/wdata on the receiver side; rd_clk/rd_rst/rdata/
// rvalid on the local side. rvalid rises on the (DEPTH/2 + 1)-th local clock
// edge after rd_rst is released; a word then takes about DEPTH/2 cycles from
// wdata to rdata.
// The 44-bit width (four links of 11 bits) and the depth of six 3-word frames
// follow the trigger design; the free-running, centred-pointer organisation is
// this design's choice.
module phase_fifo #(
  parameter int unsigned WIDTH = 44,
  parameter int unsigned DEPTH = 18
) (
  input  logic             wr_clk,
  input  logic             wr_rst,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rd_clk,
  input  logic             rd_rst,
  output logic [WIDTH-1:0] rdata,
  output logic             rvalid
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam logic [AW-1:0] LAST = AW'(DEPTH - 1);
  localparam logic [AW-1:0] HALF = AW'(DEPTH / 2);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic [AW-1:0]    fill_cnt;

  // write side
  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      wptr <= '0;
    end else begin
      mem[wptr] <= wdata;
      wptr      <= (wptr == LAST) ? '0 : wptr + 1'b1;
    end
  end

  // read side: start DEPTH/2 entries behind the writer
  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      rptr     <= AW'(DEPTH - DEPTH / 2);
      fill_cnt <= '0;
      rvalid   <= 1'b0;
      rdata    <= '0;
    end else begin
      rdata <= mem[rptr];
      rptr  <= (rptr == LAST) ? '0 : rptr + 1'b1;
      if (fill_cnt != HALF) fill_cnt <= fill_cnt + 1'b1;
      rvalid <= (fill_cnt == HALF);
    end
  end

endmodule
