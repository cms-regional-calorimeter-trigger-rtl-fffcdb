// tb_rx_lut: loads the table with a formula, reads it on all ports with random
// codes and checks value, veto bit and one-cycle latency; then rewrites one
// entry and checks that the new value is read.
module tb_rx_lut;
  import rct_pkg::*;
  logic clk = 0, we = 0;
  logic [7:0] waddr = 0;
  logic [16:0] wdata = 0;
  tower_t tower_in [4];
  eg_t eg_out [4];
  logic [9:0] et_out [4];
  int checks = 0, failures = 0;

  rx_lut dut (.*);
  always #5 clk = ~clk;

  function automatic logic [16:0] content(int a);
    return {7'((a * 3) >> 2), 10'(a * 5 + 1)};
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tower_in = '{default: '0};
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      we = 1; waddr = 8'(a); wdata = content(a);
    end
    @(negedge clk) we = 0;
    for (int n = 0; n < 200; n++) begin
      tower_t t [4];
      for (int p = 0; p < 4; p++) t[p] = tower_t'($urandom);
      tower_in = t;
      @(negedge clk);
      for (int p = 0; p < 4; p++) begin
        checks++;
        if ({eg_out[p].e, et_out[p]} != content(int'(t[p].et)) || eg_out[p].veto != t[p].fg) begin
          failures++;
          $display("FAIL port %0d addr %0d", p, t[p].et);
        end
      end
    end
    we = 1; waddr = 8'd77; wdata = 17'h1abcd;
    @(negedge clk) we = 0;
    tower_in[2] = '{fg: 1'b1, et: 8'd77};
    @(negedge clk);
    checks++;
    if ({eg_out[2].e, et_out[2]} != 17'h1abcd) begin failures++; $display("FAIL rewrite"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
