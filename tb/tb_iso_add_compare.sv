// tb_iso_add_compare: random reference and neighbour towers (small values so
// that equal energies are common); each sum must be ref + neighbour with both
// veto bits when ref >= neighbour and zero otherwise, one cycle later.
module tb_iso_add_compare;
  import rct_pkg::*;
  logic clk = 0, rst = 1;
  eg_t ref_t, nbr [4];
  pair_t sums [4];
  int checks = 0, failures = 0, n_eq = 0, n_off = 0;

  iso_add_compare dut (.*);
  always #5 clk = ~clk;

  initial begin
    #50000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_t = '0; nbr = '{default: '0};
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 500; n++) begin
      eg_t rv, nv [4];
      rv = '{veto: 1'($urandom), e: (n % 2 == 1) ? 7'($urandom) : 7'($urandom_range(0, 3))};
      foreach (nv[i]) nv[i] = '{veto: 1'($urandom), e: (n % 2 == 1) ? 7'($urandom) : 7'($urandom_range(0, 3))};
      ref_t = rv;
      nbr = nv;
      @(negedge clk);
      for (int i = 0; i < 4; i++) begin
        pair_t e;
        if (int'(rv.e) >= int'(nv[i].e)) e = '{sum: 8'(int'(rv.e) + int'(nv[i].e)), veto_ref: rv.veto, veto_nbr: nv[i].veto};
        else begin e = '0; n_off++; end
        if (rv.e == nv[i].e) n_eq++;
        checks++;
        if (sums[i] != e) begin failures++; $display("FAIL n=%0d i=%0d got %h exp %h", n, i, sums[i], e); end
      end
    end
    $display("equal=%0d disabled=%0d", n_eq, n_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
