// tb_iso_input_staging: streams random columns (4 rows per crossing, top edge
// with row 0, bottom edge with row 3, other edge inputs random) and checks
// that every row leaves as (top, ref, bottom) three cycles after it entered,
// with the edge neighbours in place for rows 0 and 3.
module tb_iso_input_staging;
  import rct_pkg::*;
  logic clk = 0, rst = 1;
  logic [1:0] ph_in = 0, ph_out;
  eg_t x_in, te_in, be_in, top, ref_t, bot;
  int checks = 0, failures = 0;

  iso_input_staging dut (.*);
  always #5 clk = ~clk;

  initial begin
    #50000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NX = 30;
  eg_t col [NX][6];   // [crossing][0 = top edge, 1..4 rows, 5 = bottom edge]

  initial begin
    foreach (col[j, r]) col[j][r] = eg_t'($urandom);
    x_in = '0; te_in = '0; be_in = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 4 * NX + 4; i++) begin
      int j, r;
      // outputs of cycle i: row of cycle i-3
      if (i >= 3 && (i - 3) / 4 < NX) begin
        int jj, rr;
        jj = (i - 3) / 4;
        rr = (i - 3) % 4;
        checks++;
        if (ref_t != col[jj][rr+1] || top != col[jj][rr] || bot != col[jj][rr+2] || ph_out != 2'(rr)) begin
          failures++;
          $display("FAIL crossing %0d row %0d: %h %h %h ph %0d", jj, rr, top, ref_t, bot, ph_out);
        end
      end
      j = i / 4;
      r = i % 4;
      ph_in = 2'(r);
      x_in  = (j < NX) ? col[j][r+1] : '0;
      te_in = (j < NX && r == 0) ? col[j][0] : eg_t'($urandom);
      be_in = (j < NX && r == 3) ? col[j][5] : eg_t'($urandom);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
