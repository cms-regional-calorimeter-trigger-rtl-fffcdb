// tb_rct_slice: end-to-end test of one region slice at its default sizes.
//
// Eight links carry random tower codes (0..126, some 255) per crossing; the
// links start in setup mode, link 3 gets Hamming errors at crossings 30 and
// 31, link 6 a receiver error at 35 and link 1 drops to setup for 40..42.
// The LUT is loaded with eg = min(code,127), E_T = 3*code (1023 for 255).
// Checked, all against models in this file:
//  - the towers leaving the Boundary Scan ASIC equal the sent region (once
//    the fixed link latency is found), with bad links zeroed; corner bits;
//  - the Isolation candidate of every crossing, 12 cycles after its first row;
//  - the Sort ASIC result of every group (four largest ranks, sub-multiset of
//    the inputs), and the bypass side;
//  - the Adder ASIC row sums with TOV/AOV, and its bypass;
//  - the link error counters after a clear; the Phase ASIC counter test
//    mode; a JTAG bypass shift.
// Each mechanism must occur at least once.
module tb_rct_slice;
  import rct_pkg::*;

  logic rx_clk = 1'b1, clk120 = 1'b1, clk160 = 1'b1;
  logic rx_rst = 1'b1, rst120 = 1'b1, rst160 = 1'b1;
  link_word_t link_in [8];
  logic test_mode = 0, cnt_clr = 0, cnt_en = 0;
  err_word_t err_out [2];
  logic lut_we = 0;
  logic [7:0] lut_waddr = 0;
  logic [16:0] lut_wdata = 0;
  eg_t te_in [4], be_in [4], le_in, re_in;
  pair_t iso_cand;
  logic iso_cand_stb;
  add_op_t add_ext [4];
  logic add_bypass = 0;
  logic [2:0] add_byp_sel = 0;
  add_op_t row_sum;
  sort_op_t sort_ext [7];
  logic sort_sel = 0;
  sort_op_t top4 [4];
  logic top4_stb;
  logic [7:0] link_tower_out [4];
  logic [2:0] corner_out [4];
  logic tck = 0, trst_n = 1, tms = 1, tdi = 0, tdo;
  logic errcnt_clr = 0;
  logic [2:0] errcnt_sel = 0;
  logic [15:0] errcnt_data;

  rct_slice dut (.*);

  always #4 clk120 = ~clk120;
  always #3 clk160 = ~clk160;
  initial begin #3; forever #4 rx_clk = ~rx_clk; end

  int checks = 0, failures = 0;
  int n_zero = 0, n_setup = 0, n_tov = 0, n_aov = 0, n_add_byp = 0, n_iso_dis = 0;
  int n_sort_byp = 0, n_sat = 0, n_test = 0, n_jtag = 0, n_iso = 0, n_sort = 0, n_sum = 0;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  initial begin
    #(24 * 400);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------- models
  function automatic logic [4:0] ref_code(input logic [17:0] d);
    logic [4:0] c;
    int unsigned pos[18] = '{3,5,6,7,9,10,11,12,13,14,15,17,18,19,20,21,22,23};
    c = '0;
    foreach (pos[j]) if (d[j]) c ^= pos[j][4:0];
    return c;
  endfunction
  function automatic logic [6:0] lut_eg(int code); return (code > 126) ? 7'd127 : 7'(code); endfunction
  function automatic logic [9:0] lut_et(int code); return (code == 255) ? 10'd1023 : 10'(3 * code); endfunction
  function automatic int code_of(logic [6:0] e); return (e == 7'd127) ? 255 : int'(e); endfunction

  localparam int NK = 70;
  logic [7:0] code [NK][8][2];
  logic       fg   [NK][8][2];
  function automatic bit setup_at(int k, int l); return k < 10 || (l == 1 && k >= 40 && k <= 42); endfunction
  function automatic bit bad_at(int k, int l);
    return setup_at(k, l) || (l == 3 && (k == 30 || k == 31)) || (l == 6 && k == 35);
  endfunction
  // region row r, column c of data crossing k: tower (r%2) of link 2c + r/2
  function automatic eg_t exp_tower(int k, int r, int c);
    int l;
    l = 2 * c + r / 2;
    if (bad_at(k, l)) return '0;
    return '{veto: fg[k][l][r % 2], e: lut_eg(int'(code[k][l][r % 2]))};
  endfunction

  // ------------------------------------------------------------ links
  int n = 0;
  always @(posedge rx_clk) begin
    if (!rx_rst) begin
      int k, w;
      k = n / 3;
      w = n % 3;
      if (k >= NK) k = NK - 1;
      for (int l = 0; l < 8; l++) begin
        logic [17:0] d;
        link_word_t lw;
        d = {fg[k][l][1], code[k][l][1], fg[k][l][0], code[k][l][0]};
        lw.err = (l == 6 && k == 35 && w == 2);
        lw.status = setup_at(k, l) ? ST_SETUP : ST_DATA;
        case (w)
          0: lw.data = code[k][l][0];
          1: lw.data = code[k][l][1] ^ ((l == 3 && (k == 30 || k == 31)) ? 8'h10 : 8'h00);
          default: lw.data = {fg[k][l][0], fg[k][l][1], ref_code(d), 1'b0};
        endcase
        if (setup_at(k, l)) lw.data = 8'hbc;
        link_in[l] <= lw;
      end
      n <= n + 1;
    end
  end

  // ------------------------------------------------------- cycle loop
  logic [1:0] slot;
  always @(posedge clk160) slot <= rst160 ? 2'd0 : slot + 2'd1;

  int    nobs = 0;              // regions observed
  bit    seen_row0 = 0;         // first whole region has started
  eg_t   [3:0] nb_te, nb_be, nb_le, nb_re;
  eg_t   [3:0] nbq_te [$], nbq_be [$], nbq_le [$], nbq_re [$];
  pair_t iso_q [$];
  sort_op_t [7:0] grp;
  sort_op_t [7:0] sort_q [$];
  bit    sort_sel_q [$];
  add_op_t sum_exp [8];
  bit    sum_exp_v [8];
  int    cyc = 0, k0 = -1, j0 = 0;
  eg_t   cur [4][4];
  bit    main_done = 0;

  function automatic add_op_t add_model(add_op_t o [8]);
    int p [4], q [2], t;
    bit aov, tov;
    aov = 0; tov = 0;
    for (int i = 0; i < 8; i++) begin
      aov |= o[i].aov;
      tov |= o[i].tov || (o[i].val == 11'h3ff);
    end
    for (int i = 0; i < 4; i++) begin
      p[i] = int'($signed(o[2*i].val)) + int'($signed(o[2*i+1].val));
      aov |= (p[i] > 1023 || p[i] < -1024);
      p[i] = ((p[i] & 32'h7ff) >= 1024) ? (p[i] & 32'h7ff) - 2048 : (p[i] & 32'h7ff);
    end
    for (int i = 0; i < 2; i++) begin
      q[i] = p[2*i] + p[2*i+1];
      aov |= (q[i] > 1023 || q[i] < -1024);
      q[i] = ((q[i] & 32'h7ff) >= 1024) ? (q[i] & 32'h7ff) - 2048 : (q[i] & 32'h7ff);
    end
    t = q[0] + q[1];
    aov |= (t > 1023 || t < -1024);
    return '{aov: aov, tov: tov, val: 11'(t)};
  endfunction

  function automatic pair_t iso_model(eg_t g [4][4], eg_t [3:0] te, eg_t [3:0] be, eg_t [3:0] le, eg_t [3:0] re, ref int dis);
    pair_t best;
    best = '0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        eg_t nbv [4];
        nbv[0] = (c == 0) ? le[r] : g[r][c-1];
        nbv[1] = (r == 3) ? be[c] : g[r+1][c];
        nbv[2] = (r == 0) ? te[c] : g[r-1][c];
        nbv[3] = (c == 3) ? re[r] : g[r][c+1];
        for (int i = 0; i < 4; i++) begin
          pair_t p;
          if (g[r][c].e >= nbv[i].e)
            p = '{sum: 8'(g[r][c].e) + 8'(nbv[i].e), veto_ref: g[r][c].veto, veto_nbr: nbv[i].veto};
          else begin
            p = '0;
            dis++;
          end
          if ((r | c | i) == 0) best = p;
          else if (p.sum > best.sum) best = p;
        end
      end
    return best;
  endfunction

  task automatic check_sort(sort_op_t [7:0] in8, bit byp);
    int rk [8], ork [4];
    bit used [8];
    bit ok;
    ok = 1;
    if (byp) begin
      for (int i = 0; i < 4; i++) ok &= (top4[i] == in8[i]);
      n_sort_byp++;
    end else begin
      foreach (rk[i]) rk[i] = int'(in8[i].rank);
      rk.rsort();
      foreach (ork[i]) ork[i] = int'(top4[i].rank);
      ork.rsort();
      for (int i = 0; i < 4; i++) ok &= (ork[i] == rk[i]);
      used = '{default: 0};
      for (int i = 0; i < 4; i++) begin
        bit f;
        f = 0;
        for (int k = 0; k < 8; k++)
          if (!f && !used[k] && in8[k] == top4[i]) begin used[k] = 1; f = 1; end
        ok &= f;
      end
    end
    n_sort++;
    chk(ok, $sformatf("sort result %p from %p", top4, in8));
  endtask

  always @(negedge clk160) begin
    if (!rst160 && !main_done) begin
      int row;
      // ---------------- outputs of this cycle
      row = (int'(slot) + 1) % 4;
      for (int c = 0; c < 4; c++) begin
        cur[row][c] = eg_t'(link_tower_out[c]);
        chk(corner_out[c] == corner_reduce(cur[row][c].e), "corner reduction");
        if (cur[row][c].e > 7) n_sat++;
      end
      // adder: op register holds this row's E_T and last cycle's external operands
      begin
        add_op_t ops [8];
        for (int c = 0; c < 4; c++) begin
          ops[c] = '{aov: 1'b0, tov: 1'b0, val: {1'b0, lut_et(code_of(cur[row][c].e))}};
          ops[4 + c] = add_ext[c];   // still the values driven last cycle
        end
        if (add_bypass) begin
          chk(row_sum == '{aov: 1'b0, tov: 1'b0, val: ops[add_byp_sel].val}, "adder bypass");
          n_add_byp++;
        end else if (sum_exp_v[(cyc + 5) % 8]) begin
          chk(row_sum == sum_exp[(cyc + 5) % 8], $sformatf("row sum got %h exp %h", row_sum, sum_exp[(cyc + 5) % 8]));
          n_sum++;
        end
        sum_exp_v[(cyc + 5) % 8] = 0;
        if (cyc > 2) begin
          sum_exp[cyc % 8]   = add_model(ops);
          sum_exp_v[cyc % 8] = 1;
          n_tov += sum_exp[cyc % 8].tov;
          n_aov += sum_exp[cyc % 8].aov;
        end
      end
      if (row == 0) seen_row0 = 1;
      if (row == 3 && seen_row0) begin
        int dis;
        dis = 0;
        nobs++;
        iso_q.push_back(iso_model(cur, nbq_te.pop_front(), nbq_be.pop_front(),
                                  nbq_le.pop_front(), nbq_re.pop_front(), dis));
        n_iso_dis += dis;
        // find the link latency, then compare every region with the links
        if (k0 < 0) begin
          for (int k = 10; k < NK; k++) begin
            bit m;
            m = 1;
            for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) m &= (cur[r][c] == exp_tower(k, r, c));
            if (m && cur[0][0].e != 0 && cur[1][2].e != 0) begin k0 = k; j0 = nobs - 1; end
          end
        end else begin
          int k;
          k = k0 + nobs - 1 - j0;
          if (k < NK)
            for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++)
              chk(cur[r][c] == exp_tower(k, r, c), $sformatf("region k=%0d r=%0d c=%0d", k, r, c));
        end
      end
      if (iso_cand_stb) begin
        pair_t e;
        e = iso_q.pop_front();
        n_iso++;
        chk(iso_cand == e, $sformatf("iso cand got %h exp %h", iso_cand, e));
      end
      if (top4_stb) check_sort(sort_q.pop_front(), sort_sel_q.pop_front());

      // ---------------- inputs of this cycle
      for (int i = 0; i < 4; i++) begin
        add_ext[i].val = (cyc % 7 == 3) ? 11'($urandom) : 11'($urandom_range(0, 100));
        add_ext[i].tov = ($urandom_range(0, 50) == 0);
        add_ext[i].aov = ($urandom_range(0, 80) == 0);
      end
      add_bypass  = (cyc % 53 == 20);
      add_byp_sel = 3'($urandom);
      // neighbours in isolation-input timing: row 0 when slot == 2
      if (slot == 2'd2) begin
        for (int i = 0; i < 4; i++) begin
          nb_te[i] = eg_t'($urandom_range(0, 255));
          nb_be[i] = eg_t'($urandom_range(0, 255));
          nb_le[i] = eg_t'($urandom_range(0, 255));
          nb_re[i] = eg_t'($urandom_range(0, 255));
        end
        nbq_te.push_back(nb_te); nbq_be.push_back(nb_be);
        nbq_le.push_back(nb_le); nbq_re.push_back(nb_re);
      end
      begin
        int r;
        r = (int'(slot) + 2) % 4;
        for (int i = 0; i < 4; i++) begin
          te_in[i] = (r == 0) ? nb_te[i] : eg_t'($urandom);
          be_in[i] = (r == 3) ? nb_be[i] : eg_t'($urandom);
        end
        le_in = nb_le[r];
        re_in = nb_re[r];
      end
      // sort groups: first cycle when slot is even
      if (slot[0] == 1'b0) begin
        grp[0] = '{rank: iso_cand.sum[7:2], tag: {iso_cand.veto_ref, iso_cand.veto_nbr, 2'b00}};
        for (int i = 0; i < 3; i++) begin
          sort_ext[i] = '{rank: 6'($urandom), tag: 4'($urandom)};
          grp[1 + i] = sort_ext[i];
        end
      end else begin
        for (int i = 3; i < 7; i++) begin
          sort_ext[i] = '{rank: 6'($urandom), tag: 4'($urandom)};
          grp[1 + i] = sort_ext[i];
        end
        sort_sel = ($urandom_range(0, 9) == 0);
        sort_q.push_back(grp);
        sort_sel_q.push_back(sort_sel);
      end
      errcnt_clr = (cyc == 24 * 4);
      cyc++;
    end
  end

  // ------------------------------------------------------- stimulus
  task automatic tclk(input logic m, input logic d, output logic o);
    tms = m; tdi = d;
    #5 o = tdo; tck = 1;
    #5 tck = 0;
  endtask

  initial begin
    for (int k = 0; k < NK; k++)
      for (int l = 0; l < 8; l++)
        for (int t = 0; t < 2; t++) begin
          code[k][l][t] = ($urandom_range(0, 40) == 0) ? 8'd255 : 8'($urandom_range(1, 126));
          fg[k][l][t]   = 1'($urandom);
        end
    for (int i = 0; i < 4; i++) begin
      te_in[i] = '0; be_in[i] = '0; add_ext[i] = '0;
      nb_te[i] = '0; nb_be[i] = '0; nb_le[i] = '0; nb_re[i] = '0;
    end
    le_in = '0; re_in = '0;
    sort_ext = '{default: '0};
    sum_exp_v = '{default: 0};
    // JTAG reset, then load the LUT while in reset
    #1 trst_n = 0;
    #5 trst_n = 1;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk160);
      lut_we = 1; lut_waddr = 8'(a); lut_wdata = {lut_eg(a), lut_et(a)};
    end
    @(negedge clk160) lut_we = 0;
    // release all resets just after a crossing boundary (multiple of 24)
    #(24 * 70 - $time + 1);
    rx_rst = 0; rst120 = 0; rst160 = 0;
    #(24 * (NK + 6));
    main_done = 1;
    chk(k0 >= 10, "link data never found at the outputs");
    // link error counters, cleared after start-up
    for (int l = 0; l < 8; l++) begin
      int e;
      errcnt_sel = 3'(l);
      #1;
      e = (l == 1) ? 3 : (l == 3) ? 2 : (l == 6) ? 1 : 0;
      chk(int'(errcnt_data) == e, $sformatf("error count link %0d = %0d, exp %0d", l, errcnt_data, e));
    end
    errcnt_sel = 3'd1; #1 n_setup = int'(errcnt_data);
    errcnt_sel = 3'd3; #1 n_zero = int'(errcnt_data);
    // Phase ASIC counter test mode seen through LUT and Boundary Scan ASIC
    @(negedge clk160) test_mode = 1; cnt_clr = 1;
    @(negedge clk160) cnt_clr = 0; cnt_en = 1;
    repeat (4) @(negedge clk160);
    for (int i = 0; i < 20; i++) begin
      logic [6:0] prev;
      prev = link_tower_out[0][6:0];
      @(negedge clk160);
      chk(link_tower_out[0][6:0] == prev + 7'd1 && link_tower_out[3] == link_tower_out[0], "test counter");
      chk(err_out[0] == '0 && err_out[1] == '0, "error channel idle in test mode");
      n_test++;
    end
    // JTAG: bypass shift through the chain of four TAPs
    begin
      logic o;
      logic [11:0] r;
      trst_n = 0; #10 trst_n = 1;
      tclk(0, 0, o); tclk(1, 0, o); tclk(0, 0, o); tclk(0, 0, o);
      for (int i = 0; i < 12; i++) begin
        tclk(i == 11, 1'(12'h06c >> i), o);
        r[i] = o;
      end
      // four TAPs in BYPASS: a 4-bit delay from tdi to tdo
      chk(r[11:4] == 8'h6c, $sformatf("jtag bypass chain %h", r));
      n_jtag++;
    end
    $display("mechanisms: zeroed-link=%0d setup=%0d tov=%0d aov=%0d add_bypass=%0d iso_disabled=%0d",
             n_zero, n_setup, n_tov, n_aov, n_add_byp, n_iso_dis);
    $display("            sort_bypass=%0d corner_sat=%0d test_count=%0d jtag=%0d iso=%0d sort=%0d sums=%0d k0=%0d",
             n_sort_byp, n_sat, n_test, n_jtag, n_iso, n_sort, n_sum, k0);
    chk(n_zero > 0 && n_setup > 0 && n_tov > 0 && n_aov > 0 && n_add_byp > 0 && n_iso_dis > 0 &&
        n_sort_byp > 0 && n_sat > 0 && n_test > 0 && n_jtag > 0 && n_iso > 40 && n_sort > 80 && n_sum > 200,
        "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
