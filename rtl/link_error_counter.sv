// link_error_counter: per-link error counters for monitoring.
//
// Each crossing the link-error flags of NLINK links are sampled (strobe stb);
// a counter per link counts crossings with an error and saturates at its
// maximum instead of wrapping. The crate controller reads a counter through
// rd_sel/rd_data and clears all counters with clr.
//
// Interface: clk/rst, stb + err[NLINK], clr; rd_sel selects the counter shown
// combinationally on rd_data. Counting the Phase ASICs' link error flags for
// readout over VME follows the trigger design; the counter width, saturation
// and the clear are this design's choices.
module link_error_counter #(
  parameter int unsigned NLINK = 8,
  parameter int unsigned CNT_W = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     stb,
  input  logic [NLINK-1:0]         err,
  input  logic                     clr,
  input  logic [$clog2(NLINK)-1:0] rd_sel,
  output logic [CNT_W-1:0]         rd_data
);
  logic [CNT_W-1:0] cnt [NLINK];

  always_ff @(posedge clk)
    if (rst || clr) cnt <= '{default: '0};
    else if (stb)
      for (int i = 0; i < NLINK; i++)
        if (err[i] && cnt[i] != '1) cnt[i] <= cnt[i] + 1'b1;

  assign rd_data = cnt[rd_sel];
endmodule
