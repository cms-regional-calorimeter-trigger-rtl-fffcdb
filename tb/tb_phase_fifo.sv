// tb_phase_fifo: writes a counting sequence on a receiver clock with a fixed
// phase offset to the read clock and checks that the read side delivers the
// same sequence, starting with the first word written after reset and
// without gaps or repeats, once rvalid is high, with the
// read-side start-up of DEPTH/2 + 1 cycles.
module tb_phase_fifo;
  localparam int W = 12, D = 18;
  logic wr_clk = 1, rd_clk = 1, wr_rst = 1, rd_rst = 1;
  logic [W-1:0] wdata = '0, rdata;
  logic rvalid;
  int checks = 0, failures = 0;

  phase_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #4 rd_clk = ~rd_clk;
  initial begin #3; forever #4 wr_clk = ~wr_clk; end

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge wr_clk) if (!wr_rst) wdata <= wdata + 1'b1;

  initial begin
    int first_cyc, cyc;
    logic [W-1:0] expect_v;
    first_cyc = -1;
    #17 wr_rst = 0; rd_rst = 0;
    for (cyc = 0; cyc < 200; cyc++) begin
      @(negedge rd_clk);
      if (rvalid) begin
        if (first_cyc < 0) begin
          first_cyc = cyc;
          expect_v = rdata;
          checks++;
          if (rdata != 0) begin failures++; $display("FAIL first word %0d, expected 0", rdata); end
        end
        checks++;
        if (rdata != expect_v) begin
          failures++;
          $display("FAIL cycle %0d got %0d exp %0d", cyc, rdata, expect_v);
        end
        expect_v++;
      end
    end
    checks++;
    if (first_cyc != D / 2 + 1) begin failures++; $display("FAIL latency %0d", first_cyc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
