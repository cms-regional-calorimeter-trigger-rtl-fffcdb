// tb_bscan_asic: exhaustive corner-tower reduction (every 7-bit value on every
// corner input), one-cycle pass-through of the link words, and an EXTEST
// through the TAP that overrides the output pins with a shifted-in pattern.
module tb_bscan_asic;
  localparam int NP = 4, PW = 8, NC = 4;
  localparam int NI = NP * PW + NC * 7, NO = NP * PW + NC * 3;
  logic clk = 0, rst = 1;
  logic [PW-1:0] pass_in [NP], pass_out [NP];
  logic [6:0] corner_in [NC];
  logic [2:0] corner_out [NC];
  logic tck = 0, trst_n = 1, tms = 1, tdi = 0, tdo;
  int checks = 0, failures = 0, n_sat = 0;

  bscan_asic dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic tclk(input logic m, input logic d);
    tms = m; tdi = d;
    #7 tck = 1;
    #7 tck = 0;
  endtask

  initial begin
    #1 trst_n = 0;
    #5 trst_n = 1;
    pass_in = '{default: '0};
    corner_in = '{default: '0};
    repeat (2) @(negedge clk);
    rst = 0;
    for (int v = 0; v < 128 + 2; v++) begin
      logic [6:0] cv [NC];
      logic [PW-1:0] pv [NP];
      for (int i = 0; i < NC; i++) cv[i] = 7'(v + 32 * i);
      for (int i = 0; i < NP; i++) pv[i] = PW'($urandom);
      corner_in = cv;
      pass_in = pv;
      @(negedge clk);
      for (int i = 0; i < NC; i++) begin
        int e;
        e = (cv[i] > 7) ? 7 : int'(cv[i]);
        if (cv[i] > 7) n_sat++;
        chk(corner_out[i] == 3'(e), $sformatf("corner %0d in %0d out %0d", i, cv[i], corner_out[i]));
      end
      for (int i = 0; i < NP; i++) chk(pass_out[i] == pv[i], "pass-through");
    end
    // EXTEST: IR = 000, then shift a pattern into the output cells
    tclk(0, 0);                                // TLR -> RTI
    tclk(1, 0); tclk(1, 0); tclk(0, 0); tclk(0, 0);   // -> SHIFT-IR
    tclk(0, 0); tclk(0, 0); tclk(1, 0);        // IR = 000, exit
    tclk(1, 0); tclk(0, 0);                    // update, RTI
    tclk(1, 0); tclk(0, 0); tclk(0, 0);        // -> SHIFT-DR
    for (int i = 0; i < NI + NO; i++) tclk(i == NI + NO - 1, (i >= NI) ? 1'b1 : 1'b0);
    tclk(1, 0); tclk(0, 0);                    // update, RTI
    for (int i = 0; i < NP; i++) chk(pass_out[i] == '1, "extest drives pass pins");
    for (int i = 0; i < NC; i++) chk(corner_out[i] == 3'b111, "extest drives corner pins");
    chk(n_sat > 0, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
