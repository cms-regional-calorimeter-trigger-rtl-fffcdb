// tb_sort_asic: back-to-back groups of eight random operands (small rank range
// so that ties are common). For each group the four output ranks must equal
// the four largest input ranks, every output operand must be one of the
// inputs (each used once), and the result must arrive four cycles after the
// group's first cycle. Every fifth group uses the bypass side instead.
module tb_sort_asic;
  import rct_pkg::*;
  logic clk = 0, rst = 1, first = 0, sel = 0;
  sort_op_t op_in [4], top4 [4];
  logic top4_stb;
  int checks = 0, failures = 0, n_byp = 0;

  sort_asic dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NG = 150;
  sort_op_t grp [NG][8];

  task automatic check_group(int j);
    int rk [8], out_rk [4];
    bit used [8];
    bit ok;
    ok = 1;
    if (j % 5 == 4) begin
      for (int i = 0; i < 4; i++) ok &= (top4[i] == grp[j][i]);
      n_byp++;
    end else begin
      foreach (rk[i]) rk[i] = int'(grp[j][i].rank);
      rk.rsort();
      foreach (out_rk[i]) out_rk[i] = int'(top4[i].rank);
      out_rk.rsort();
      for (int i = 0; i < 4; i++) ok &= (out_rk[i] == rk[i]);
      used = '{default: 0};
      for (int i = 0; i < 4; i++) begin
        bit found;
        found = 0;
        for (int k = 0; k < 8; k++)
          if (!found && !used[k] && grp[j][k] == top4[i]) begin
            used[k] = 1;
            found = 1;
          end
        ok &= found;
      end
    end
    checks++;
    if (!ok || !top4_stb) begin
      failures++;
      $display("FAIL group %0d stb=%b out %p in %p", j, top4_stb, top4, grp[j]);
    end
  endtask

  initial begin
    for (int j = 0; j < NG; j++)
      for (int k = 0; k < 8; k++)
        grp[j][k] = '{rank: (j % 2 == 1) ? 6'($urandom) : 6'($urandom_range(0, 5)), tag: 4'(k)};
    op_in = '{default: '0};
    repeat (3) @(negedge clk);
    for (int i = 0; i < 2 * NG + 8; i++) begin
      int j;
      @(negedge clk);
      rst = 0;
      // outputs of cycle i
      if (i >= 4 && i % 2 == 0 && (i - 4) / 2 < NG) check_group((i - 4) / 2);
      else if (i > 0 && i < 2 * NG + 4) begin
        checks++;
        if (top4_stb) begin failures++; $display("FAIL stray stb %0d", i); end
      end
      // inputs of cycle i
      j = i / 2;
      first = (i % 2 == 0) && (j < NG);
      sel   = (j % 5 == 4);
      for (int k = 0; k < 4; k++) op_in[k] = (j < NG) ? grp[j][(i % 2) * 4 + k] : '0;
      if (j >= NG) first = (i % 2 == 0) ? 1'b1 : 1'b0;
    end
    $display("bypassed groups=%0d", n_byp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
