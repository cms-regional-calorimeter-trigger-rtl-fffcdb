// tb_isolation_asic: random 4 x 4 regions with their edge neighbours, one per
// crossing, streamed back to back. For each crossing the expected candidate
// (largest enabled two-tower sum, first found on ties, scanning rows, then
// columns A..D, then left/bottom/top/right) is computed here and must appear
// on cand exactly 12 cycles after the crossing's first row, with cand_stb.
module tb_isolation_asic;
  import rct_pkg::*;
  logic clk = 0, rst = 1, cyc1 = 0;
  eg_t ref_in [4], te_in [4], be_in [4], le_in, re_in;
  pair_t cand;
  logic cand_stb;
  int checks = 0, failures = 0, n_disabled = 0, n_enabled = 0;

  isolation_asic dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NX = 40;
  eg_t g [NX][6][6];          // [crossing][row+1][col+1], with edge rings
  pair_t expv [NX];

  function automatic eg_t rnd_eg(int j);
    eg_t t;
    t.e = (j % 3 == 0) ? 7'($urandom) : 7'($urandom_range(0, 6));
    t.veto = 1'($urandom);
    return t;
  endfunction

  initial begin
    // build regions and expected results
    for (int j = 0; j < NX; j++) begin
      pair_t best;
      for (int r = 0; r < 6; r++) for (int c = 0; c < 6; c++) g[j][r][c] = rnd_eg(j);
      best = '0;
      for (int r = 1; r <= 4; r++)
        for (int c = 1; c <= 4; c++) begin
          eg_t rf, nb [4];
          rf = g[j][r][c];
          nb = '{g[j][r][c-1], g[j][r+1][c], g[j][r-1][c], g[j][r][c+1]};
          for (int k = 0; k < 4; k++) begin
            pair_t p;
            if (rf.e >= nb[k].e) begin
              p = '{sum: 8'(rf.e) + 8'(nb[k].e), veto_ref: rf.veto, veto_nbr: nb[k].veto};
              n_enabled++;
            end else begin
              p = '0;
              n_disabled++;
            end
            if (r == 1 && c == 1 && k == 0) best = p;
            else if (p.sum > best.sum) best = p;
          end
        end
      expv[j] = best;
    end
    for (int c = 0; c < 4; c++) begin ref_in[c] = '0; te_in[c] = '0; be_in[c] = '0; end
    le_in = '0; re_in = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 4 * NX + 16; i++) begin
      int j, r;
      @(negedge clk);
      // outputs of cycle i
      if (i >= 12 && i % 4 == 0 && (i - 12) / 4 < NX) begin
        checks++;
        if (!cand_stb || cand != expv[(i - 12) / 4]) begin
          failures++;
          $display("FAIL crossing %0d got %h stb=%b exp %h", (i - 12) / 4, cand, cand_stb, expv[(i - 12) / 4]);
        end
      end else if (i > 0 && i < 4 * NX + 12) begin
        checks++;
        if (cand_stb) begin failures++; $display("FAIL stray cand_stb at cycle %0d", i); end
      end
      // inputs of cycle i
      j = i / 4;
      r = i % 4;
      cyc1 = (r == 0);
      for (int c = 0; c < 4; c++) begin
        ref_in[c] = (j < NX) ? g[j][r+1][c+1] : '0;
        te_in[c]  = (j < NX && r == 0) ? g[j][0][c+1] : eg_t'($urandom);
        be_in[c]  = (j < NX && r == 3) ? g[j][5][c+1] : eg_t'($urandom);
      end
      le_in = (j < NX) ? g[j][r+1][0] : '0;
      re_in = (j < NX) ? g[j][r+1][5] : '0;
    end
    checks++;
    if (n_disabled == 0) begin failures++; $display("FAIL no disabled sums"); end
    $display("enabled sums=%0d disabled sums=%0d", n_enabled, n_disabled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
