// tb_iso_find_max: a new set of four sums every cycle; the maximum (first of
// equal maxima, with its veto bits) must appear two cycles later.
module tb_iso_find_max;
  import rct_pkg::*;
  logic clk = 0, rst = 1;
  pair_t sums [4], max_o;
  pair_t expq [$];
  int checks = 0, failures = 0;

  iso_find_max dut (.*);
  always #5 clk = ~clk;

  initial begin
    #50000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sums = '{default: '0};
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 500; n++) begin
      pair_t s [4], best;
      foreach (s[i]) s[i] = '{sum: (n % 2 == 1) ? 8'($urandom) : 8'($urandom_range(0, 3)),
                              veto_ref: 1'($urandom), veto_nbr: 1'($urandom)};
      best = s[0];
      for (int i = 1; i < 4; i++) if (s[i].sum > best.sum) best = s[i];
      expq.push_back(best);
      sums = s;
      @(negedge clk);
      if (n >= 1) begin
        pair_t e;
        e = expq.pop_front();
        checks++;
        if (max_o != e) begin failures++; $display("FAIL n=%0d got %h exp %h", n, max_o, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
