// phase_cntrl: frames one serial link and puts its frames in step with the
// local bunch-crossing clock.
//
// Each link delivers a 24-bit frame per 25 ns crossing as three 8-bit words at
// 120 MHz: word 0 is the energy of tower 0, word 1 the energy of tower 1, and
// word 2 holds {fine grain 0, fine grain 1, Hamming code[4:0], spare}. The
// receiver's status bits tell setup mode from data mode; while the link is in
// setup mode (or reports any non-data status) the word counter is held at 0,
// so the first data word after setup is taken as word 0 of a frame. This is
// how the receiver status sets the frame phase.
//
// Completed frames wait in a pending register; once per crossing, in the
// cycle where bx_ph == 1, the pending frame moves to frame_out, which is then
// stable for a full crossing and can be sampled by the 160 MHz side. A frame
// that saw setup status, or a crossing in which no new frame completed, is
// marked down; the receiver error bit of any of the three words is kept.
//
// Interface: clk (local 120 MHz), rst (sync), word/valid from the phase FIFO,
// bx_ph = index (0..2) of the current 120 MHz cycle within the crossing.
// The use of status to set the phase follows the trigger design; the status
// encoding, the word layout and the transfer cycle are this design's choices.
module phase_cntrl
  import rct_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  link_word_t word,
  input  logic       valid,
  input  logic [1:0] bx_ph,
  output frame_t     frame_out
);

  logic [1:0] wcnt;
  logic [7:0] w0, w1;
  logic       err_acc;
  logic       fresh;
  frame_t     pending;

  logic   is_data, asm_done;
  frame_t asm_frame, pend_next;

  assign is_data  = valid && (word.status == ST_DATA);
  assign asm_done = is_data && (wcnt == 2'd2);

  always_comb begin
    asm_frame.t0     = '{fg: word.data[7], et: w0};
    asm_frame.t1     = '{fg: word.data[6], et: w1};
    asm_frame.edc    = word.data[5:1];
    asm_frame.spare  = word.data[0];
    asm_frame.status = word.status;
    asm_frame.rx_err = err_acc | word.err;
    asm_frame.down   = 1'b0;
    pend_next        = asm_done ? asm_frame : pending;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wcnt      <= '0;
      w0        <= '0;
      w1        <= '0;
      err_acc   <= 1'b0;
      fresh     <= 1'b0;
      pending   <= '0;
      frame_out <= '{status: ST_SETUP, down: 1'b1, default: '0};
    end else begin
      // word framing
      if (!is_data) begin
        wcnt    <= '0;
        err_acc <= 1'b0;
      end else begin
        unique case (wcnt)
          2'd0:    begin w0 <= word.data; err_acc <= word.err;           wcnt <= 2'd1; end
          2'd1:    begin w1 <= word.data; err_acc <= err_acc | word.err; wcnt <= 2'd2; end
          default: begin                  err_acc <= 1'b0;               wcnt <= 2'd0; end
        endcase
      end
      if (asm_done) pending <= asm_frame;
      // crossing-aligned transfer
      if (bx_ph == 2'd1) begin
        frame_out      <= pend_next;
        frame_out.down <= !(fresh || asm_done);
        fresh          <= 1'b0;
      end else if (asm_done) begin
        fresh <= 1'b1;
      end
    end
  end

endmodule
