// tb_adder_asic: random and directed operands through the adder pipeline.
// The expected sum, TOV and AOV are computed with plain integer arithmetic:
// AOV is set when any partial sum of the fixed tree (pairs, quads, all eight)
// leaves the 11-bit signed range, or an input AOV is set. The result must
// appear exactly four clock edges after the operands. Bypass is checked too.
// Finally the JTAG port is used: EXTEST drives a pattern from the output scan
// cells onto sum_out, and the captured input cells must show op_in[0].
module tb_adder_asic;
  import rct_pkg::*;
  logic clk = 0, rst = 1, master = 1, bypass = 0;
  logic [2:0] byp_sel = 0;
  add_op_t op_in [8];
  add_op_t sum_out;
  logic tck = 0, trst_n = 1, tms = 1, tdi = 0, tdo;
  localparam int NB = 8 * 13 + 5 + 13;
  int checks = 0, failures = 0, n_aov = 0, n_tov = 0;

  adder_asic dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int wrap11(int v);
    int r;
    r = v & 32'h7ff;
    return (r >= 1024) ? r - 2048 : r;
  endfunction
  function automatic bit out_of_range(int v); return v > 1023 || v < -1024; endfunction

  add_op_t exp_q [$];

  function automatic add_op_t model(add_op_t o [8], logic m);
    int p [4], q [2], t;
    bit aov, tov;
    aov = 0; tov = 0;
    for (int i = 0; i < 8; i++) begin
      aov |= o[i].aov;
      tov |= o[i].tov || (m && o[i].val == 11'h3ff);
    end
    for (int i = 0; i < 4; i++) begin
      p[i] = int'($signed(o[2*i].val)) + int'($signed(o[2*i+1].val));
      aov |= out_of_range(p[i]);
      p[i] = wrap11(p[i]);
    end
    for (int i = 0; i < 2; i++) begin
      q[i] = p[2*i] + p[2*i+1];
      aov |= out_of_range(q[i]);
      q[i] = wrap11(q[i]);
    end
    t = q[0] + q[1];
    aov |= out_of_range(t);
    return '{aov: aov, tov: tov, val: 11'(wrap11(t))};
  endfunction

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
    for (int i = 0; i < 8; i++) op_in[i] = '0;
    #1 trst_n = 0;
    #1 trst_n = 1;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 400; n++) begin
      for (int i = 0; i < 8; i++) begin
        op_in[i].val = (n % 3 == 0) ? 11'($urandom) : 11'($urandom_range(0, 255));
        op_in[i].tov = ($urandom_range(0, 40) == 0);
        op_in[i].aov = ($urandom_range(0, 60) == 0);
        if (n % 50 == 7) op_in[i].val = (i == 3) ? 11'h3ff : 11'd1;
      end
      master = (n < 200);
      exp_q.push_back(model(op_in, master));
      @(negedge clk);
      if (n >= 3) begin
        add_op_t e;
        e = exp_q.pop_front();
        checks++;
        if (sum_out != e) begin
          failures++;
          $display("FAIL n=%0d got %h exp %h", n, sum_out, e);
        end
        n_aov += e.aov;
        n_tov += e.tov;
      end
    end
    // bypass: operand byp_sel of the registered inputs, flags cleared
    bypass = 1;
    for (int s = 0; s < 8; s++) begin
      byp_sel = 3'(s);
      #1;
      checks++;
      if (sum_out != '{aov: 1'b0, tov: 1'b0, val: op_in[s].val}) begin
        failures++;
        $display("FAIL bypass %0d", s);
      end
    end
    // JTAG EXTEST on the output scan cells
    begin
      logic o;
      logic [NB-1:0] din, dout;
      tclk(0, 0, o);
      jshift(1, 3, NB'(3'b000), dout);
      checks++;
      if (dout[2:0] != 3'b001) begin failures++; $display("FAIL IR capture %b", dout[2:0]); end
      din = '0;
      din[NB-1 -: 13] = 13'h1a5c;
      jshift(0, NB, din, dout);
      checks++;
      if (sum_out != 13'h1a5c) begin failures++; $display("FAIL extest drive %h", sum_out); end
      checks++;
      if (dout[12:0] != op_in[0]) begin failures++; $display("FAIL extest capture %h", dout[12:0]); end
      trst_n = 0; #1 trst_n = 1; #1;
      checks++;
      if (sum_out != '{aov: 1'b0, tov: 1'b0, val: op_in[byp_sel].val}) begin
        failures++; $display("FAIL functional output after TAP reset");
      end
    end
    checks++;
    if (n_aov == 0 || n_tov == 0) begin
      failures++;
      $display("FAIL overflow cases not exercised");
    end
    $display("aov=%0d tov=%0d", n_aov, n_tov);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
