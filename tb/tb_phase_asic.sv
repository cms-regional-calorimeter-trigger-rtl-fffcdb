// tb_phase_asic: end-to-end test of the link receiver and synchroniser.
// Time unit: one crossing = 24 units (160 MHz period 6, 120 MHz period 8).
// Four links send frames whose tower energies encode the crossing number k
// and link number; links start in setup mode, link 2 gets a Hamming error at
// k=20, link 3 a receiver error at k=25, link 1 drops to setup for k=30..32.
// The outputs are checked slot by slot against frames rebuilt here, including
// zeroing and the error word; then the counter test mode is checked, and
// finally JTAG EXTEST drives a pattern from the output scan cells onto the
// three output channels while the input cells capture the control pins.
module tb_phase_asic;
  import rct_pkg::*;

  logic rx_clk = 1'b1, clk120 = 1'b1, clk160 = 1'b1;
  logic rx_rst = 1'b1, rst120 = 1'b1, rst160 = 1'b1;
  link_word_t d_in [4];
  logic [1:0] sel;
  logic test_mode = 1'b0, cnt_clr = 1'b0, cnt_en = 1'b0;
  tower_t dout_a, dout_b;
  err_word_t err_out;
  logic [3:0] link_err;
  logic tck = 0, trst_n = 1, tms = 1, tdi = 0, tdo;
  localparam int NB = 4 * 11 + 5 + 27;
  int checks = 0, failures = 0;

  phase_asic dut (.*);

  always #4 clk120 = ~clk120;
  always #3 clk160 = ~clk160;
  initial begin #3; forever #4 rx_clk = ~rx_clk; end

  // reference Hamming code: XOR of positions of the set data bits
  function automatic logic [4:0] ref_code(input logic [17:0] d);
    logic [4:0] c;
    int unsigned pos[18] = '{3,5,6,7,9,10,11,12,13,14,15,17,18,19,20,21,22,23};
    c = '0;
    foreach (pos[j]) if (d[j]) c ^= pos[j][4:0];
    return c;
  endfunction

  function automatic logic [7:0] et0(int k, int c); return {k[5:0], c[1:0]}; endfunction
  function automatic logic [7:0] et1(int k, int c); return ~{k[5:0], c[1:0]} ^ 8'h5a; endfunction
  function automatic logic fg0(int k); return k[0]; endfunction
  function automatic logic fg1(int c); return c[0]; endfunction
  function automatic bit in_setup(int k, int c);
    return (k < 10) || (c == 1 && k >= 30 && k <= 32);
  endfunction

  // ------------------------------------------------------------ link driver
  int n = 0;
  always @(posedge rx_clk) begin
    if (!rx_rst) begin
      int k, w;
      k = n / 3;
      w = n % 3;
      for (int c = 0; c < 4; c++) begin
        logic [17:0] d;
        logic [4:0] e;
        link_word_t lw;
        d = {fg1(c), et1(k, c), fg0(k), et0(k, c)};
        e = ref_code(d);
        lw.err = (c == 3 && k == 25 && w == 1);
        lw.status = in_setup(k, c) ? ST_SETUP : ST_DATA;
        case (w)
          0: lw.data = et0(k, c);
          1: lw.data = et1(k, c) ^ ((c == 2 && k == 20) ? 8'h04 : 8'h00);
          default: lw.data = {fg0(k), fg1(c), e, 1'b0};
        endcase
        if (in_setup(k, c)) lw.data = 8'hbc;
        d_in[c] <= lw;
      end
      n <= n + 1;
    end
  end

  always @(posedge clk160)
    if (rst160) sel <= 2'd0;
    else        sel <= sel + 2'd1;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  initial begin
    #(24 * 400);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------- checker
  tower_t oa [4], ob [4];
  err_word_t oe [4];
  int k0 = -1, m = 0, m0 = 0, zeroed = 0, errs_seen = 0;

  task automatic check_crossing();
    // find the crossing number from link 0, tower 0 once data flows
    if (k0 < 0) begin
      if (!oe[0].any_err && oa[0].et != 0) begin
        k0 = int'(oa[0].et[7:2]);
        m0 = m;
      end else return;
    end
    begin
      int k;
      k = k0 + (m - m0);
      if (k > 45) return;
      for (int c = 0; c < 4; c++) begin
        bit bad;
        tower_t t0, t1, g0, g1;
        logic [17:0] d;
        bad = in_setup(k, c) || (c == 2 && k == 20) || (c == 3 && k == 25);
        g0 = (c < 2) ? oa[2*c] : ob[2*(c-2)];
        g1 = (c < 2) ? oa[2*c+1] : ob[2*(c-2)+1];
        d  = {fg1(c), et1(k, c), fg0(k), et0(k, c)};
        t0 = bad ? '0 : d[8:0];
        t1 = bad ? '0 : d[17:9];
        chk(g0 == t0 && g1 == t1, $sformatf("towers k=%0d link=%0d got %h %h exp %h %h", k, c, g0, g1, t0, t1));
        chk(oe[c].any_err == bad, $sformatf("err flag k=%0d link=%0d", k, c));
        if (!in_setup(k, c))
          chk(oe[c].edc == ref_code(d) && oe[c].rx_err == (c == 3 && k == 25),
              $sformatf("err word k=%0d link=%0d", k, c));
        if (bad) zeroed++;
      end
    end
  endtask

  logic [1:0] sel_d;
  always @(posedge clk160) begin
    sel_d <= sel;
    if (!rst160 && !test_mode) begin
      oa[sel_d] = dout_a;
      ob[sel_d] = dout_b;
      oe[sel_d] = err_out;
      if (sel_d == 2'd3) begin
        check_crossing();
        m++;
      end
    end
  end

  task automatic tclk(input logic m, input logic d, output logic o);
    tms = m; tdi = d;
    #2 o = tdo; tck = 1;
    #2 tck = 0;
  endtask

  // shift len bits through IR (ir = 1) or DR from Run-Test/Idle back to it
  task automatic jshift(input bit ir, input int len, input logic [NB-1:0] din,
                        output logic [NB-1:0] dout);
    logic o;
    dout = '0;
    tclk(1, 0, o);
    if (ir) tclk(1, 0, o);
    tclk(0, 0, o); tclk(0, 0, o);
    for (int i = 0; i < len; i++) begin
      tclk(i == len - 1, din[i], o);
      dout[i] = o;
    end
    tclk(1, 0, o); tclk(0, 0, o);
  endtask

  initial begin
    #1 trst_n = 0;
    #1 trst_n = 1;
    #(24 * 2 - 1);
    rx_rst = 0; rst120 = 0; rst160 = 0;
    #(24 * 60);
    chk(k0 >= 10, "data never appeared");
    chk(zeroed == 5, $sformatf("zeroed link-crossings %0d", zeroed));
    // counter test mode
    @(negedge clk160) test_mode = 1; cnt_clr = 1;
    @(negedge clk160) cnt_clr = 0; cnt_en = 1;
    repeat (10) @(negedge clk160);
    cnt_en = 0;
    @(negedge clk160);
    chk(dout_a == 9'd10 && dout_b == 9'd10, $sformatf("test counter %0d", dout_a));
    chk(err_out == '0, "error channel not idle in test mode");
    // JTAG EXTEST on the output scan cells
    begin
      logic o;
      logic [NB-1:0] din, dout;
      tclk(0, 0, o);
      jshift(1, 3, NB'(3'b000), dout);
      chk(dout[2:0] == 3'b001, "IR capture");
      din = '0;
      din[NB-1 -: 27] = 27'h5a3c96e;
      jshift(0, NB, din, dout);
      chk({err_out, dout_b, dout_a} == 27'h5a3c96e, "extest drives the outputs");
      chk(dout[48:46] == 3'b001, $sformatf("extest capture %b", dout[48:46]));
      trst_n = 0; #1 trst_n = 1; #1;
      chk(dout_a == 9'd10 && err_out == '0, "functional outputs after TAP reset");
    end
    $display("crossings checked from k=%0d, zeroed link-crossings=%0d", k0, zeroed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
