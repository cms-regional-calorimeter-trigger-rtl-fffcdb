// edc_check: Hamming code check for one link frame.
//
// The 18 data bits of a frame are protected by a 5-bit Hamming code. The
// check recomputes the code from the received data and compares it with the
// received code; any difference flags the frame. With the data bits placed at
// the non-power-of-two positions 3,5,6,7,9..15,17..23 of a 23-bit codeword,
// check bit i is the parity of the data bits whose position has bit i set, so
// any single or double bit error gives a nonzero syndrome.
//
// Interface: purely combinational. data/edc_rx in; edc_calc, syndrome and
// mismatch out. That the code is a 5-bit Hamming code over 18 bits follows the
// trigger design; the assignment of data bits to positions is this design's.
module edc_check
  import rct_pkg::*;
(
  input  logic [FRAME_DATA_W-1:0] data,
  input  logic [EDC_W-1:0]        edc_rx,
  output logic [EDC_W-1:0]        edc_calc,
  output logic [EDC_W-1:0]        syndrome,
  output logic                    mismatch
);

  // Codeword position of data bit j.
  function automatic int unsigned data_pos(input int unsigned j);
    int unsigned p;
    int unsigned n;
    p = 0;
    n = 0;
    for (int unsigned k = 1; k < 32; k++) begin
      if ((k & (k - 1)) != 0) begin       // not a power of two
        if (n == j) p = k;
        n++;
      end
    end
    return p;
  endfunction

  always_comb begin
    edc_calc = '0;
    for (int unsigned i = 0; i < EDC_W; i++)
      for (int unsigned j = 0; j < FRAME_DATA_W; j++)
        if (((data_pos(j) >> i) & 1) == 1) edc_calc[i] ^= data[j];
  end

  assign syndrome = edc_calc ^ edc_rx;
  assign mismatch = |syndrome;

endmodule
