// tb_phase_cntrl: feeds one link's words (setup first, then frames whose
// tower codes count with the crossing) and checks that each crossing's
// frame_out carries a complete, correctly framed frame with the right fields,
// that a receiver error is kept, and that crossings in setup are marked down.
module tb_phase_cntrl;
  import rct_pkg::*;
  logic clk = 0, rst = 1, valid = 0;
  link_word_t word;
  logic [1:0] bx_ph;
  frame_t frame_out;
  int checks = 0, failures = 0, n_down = 0, n_err = 0;

  phase_cntrl dut (.*);
  always #5 clk = ~clk;

  initial begin
    #50000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit setup_k(int k); return k < 3 || (k >= 20 && k < 23); endfunction

  initial begin
    int last_k;
    word = '0;
    bx_ph = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    last_k = -1;
    // words start at word offset 1 into the local crossing (arbitrary phase)
    for (int i = 0; i < 3 * 40; i++) begin
      int n, k, w;
      n = i - 1;
      k = (n < 0) ? 0 : n / 3;
      w = (n < 0) ? 0 : n % 3;
      bx_ph = 2'(i % 3);
      valid = 1;
      word.status = setup_k(k) ? ST_SETUP : ST_DATA;
      word.err = (k == 12 && w == 1);
      case (w)
        0: word.data = 8'(k);
        1: word.data = 8'(k + 100);
        default: word.data = {1'b1, 1'b0, 5'(k), 1'b1};
      endcase
      @(negedge clk);
      // frame_out changes after the cycle with bx_ph == 1
      if (i % 3 == 1 && i > 6) begin
        int kk;
        kk = (i - 4) / 3;   // frame completed most recently
        checks++;
        if (setup_k(kk)) begin
          n_down++;
          if (!frame_out.down) begin failures++; $display("FAIL k=%0d not down", kk); end
        end else begin
          if (frame_out.down || frame_out.t0.et != 8'(kk) || frame_out.t1.et != 8'(kk + 100) ||
              !frame_out.t0.fg || frame_out.t1.fg || frame_out.edc != 5'(kk) || !frame_out.spare ||
              frame_out.rx_err != (kk == 12)) begin
            failures++;
            $display("FAIL k=%0d frame %p", kk, frame_out);
          end
          n_err += frame_out.rx_err;
        end
      end
    end
    checks++;
    if (n_down == 0 || n_err != 1) begin failures++; $display("FAIL down=%0d err=%0d", n_down, n_err); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
