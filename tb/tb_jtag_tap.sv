// tb_jtag_tap: drives the TAP through TMS sequences. Checks the IR capture
// pattern, the one-bit delay of BYPASS, SAMPLE capture of input and output
// pins read out on TDO, EXTEST driving the output pins from the shifted-in
// pattern, and the return to functional outputs after Test-Logic-Reset.
module tb_jtag_tap;
  localparam int NI = 5, NO = 7, N = NI + NO;
  logic tck = 0, trst_n = 1, tms = 1, tdi = 0, tdo, extest;
  logic [NI-1:0] pin_in;
  logic [NO-1:0] core_out, pin_out;
  int checks = 0, failures = 0;

  jtag_tap #(.N_IN(NI), .N_OUT(NO)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // one TCK cycle; returns TDO as seen before the rising edge
  task automatic clk1(input logic m, input logic d, output logic o);
    tms = m; tdi = d;
    #5 o = tdo; tck = 1;
    #5 tck = 0;
  endtask

  task automatic shift(input bit ir_not_dr, input int len, input logic [63:0] din, output logic [63:0] dout);
    logic o;
    clk1(1, 0, o);                   // RTI -> SEL_DR
    if (ir_not_dr) clk1(1, 0, o);    // -> SEL_IR
    clk1(0, 0, o);                   // -> CAPTURE
    clk1(0, 0, o);                   // -> SHIFT
    dout = '0;
    for (int i = 0; i < len; i++) begin
      clk1(i == len - 1, din[i], o);  // last bit exits to EXIT1
      dout[i] = o;
    end
    clk1(1, 0, o);                   // -> UPDATE
    clk1(0, 0, o);                   // -> RTI
  endtask

  initial begin
    logic [63:0] r;
    logic o;
    pin_in = 5'b10110;
    core_out = 7'b0011010;
    #1 trst_n = 0;
    #11 trst_n = 1;
    clk1(0, 0, o);                   // TLR -> RTI
    chk(pin_out == core_out && !extest, "functional outputs after reset");
    // BYPASS after reset: 1-bit delay
    shift(0, 8, 64'h00000000000000a5, r);
    chk(r[7:1] == 7'(8'ha5), $sformatf("bypass delay %h", r[7:0]));
    // SAMPLE: IR capture pattern 001 shifted out
    shift(1, 3, 64'b001, r);
    chk(r[2:0] == 3'b001, $sformatf("IR capture %b", r[2:0]));
    shift(0, N, 64'h0, r);
    chk(r[N-1:0] == {core_out, pin_in}, $sformatf("sample %h", r[N-1:0]));
    chk(pin_out == core_out, "sample leaves pins alone");
    // EXTEST: preload pattern and drive it
    shift(1, 3, 64'b000, r);
    pin_in = 5'b01001;
    shift(0, N, {52'h0, 7'b1100101, 5'b0}, r);
    chk(extest, "extest selected");
    chk(pin_out == 7'b1100101, $sformatf("extest pins %b", pin_out));
    chk(r[NI-1:0] == 5'b01001, "extest captures inputs");
    // back to Test-Logic-Reset by TMS
    repeat (5) clk1(1, 0, o);
    chk(!extest && pin_out == core_out, "TLR restores functional outputs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
