// tb_edc_check: self-checking test of the frame Hamming check.
// Reference code: XOR of the codeword positions of all set data bits
// (positions are the non-powers of two 3,5,6,7,9,...). Checks the calculated
// code for random data, that every single and double bit error in data or
// code is flagged, and that clean frames are not flagged.
module tb_edc_check;
  import rct_pkg::*;
  logic [17:0] data;
  logic [4:0]  edc_rx, edc_calc, syndrome;
  logic        mismatch;
  int checks = 0, failures = 0;

  edc_check dut (.*);

  function automatic logic [4:0] ref_code(input logic [17:0] d);
    logic [4:0] c;
    int unsigned pos[18] = '{3,5,6,7,9,10,11,12,13,14,15,17,18,19,20,21,22,23};
    c = '0;
    foreach (pos[j]) if (d[j]) c ^= pos[j][4:0];
    return c;
  endfunction

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s data=%h rx=%h calc=%h", what, data, edc_rx, edc_calc);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [22:0] cw;
    logic [17:0] d0;
    for (int n = 0; n < 300; n++) begin
      d0 = 18'($urandom);
      data = d0;
      edc_rx = ref_code(data);
      #1;
      chk(edc_calc == ref_code(data), "code");
      chk(!mismatch, "clean frame flagged");
      // single and double errors over the 23 transmitted bits
      for (int a = 0; a < 23; a++) begin
        int b;
        b = int'($urandom_range(22));
        cw = {d0, ref_code(d0)};
        cw[a] ^= 1'b1;
        if (n % 2 == 1 && b != a) cw[b] ^= 1'b1;
        {data, edc_rx} = cw;
        #1;
        chk(mismatch, "error not flagged");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
