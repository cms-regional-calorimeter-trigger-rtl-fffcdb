// tb_link_error_counter: random error flags on 8 links, counted against a
// model; checks clear, reads of every counter, and saturation of a small
// (4-bit) counter.
module tb_link_error_counter;
  logic clk = 0, rst = 1, stb = 0, clr = 0;
  logic [7:0] err = 0;
  logic [2:0] rd_sel = 0;
  logic [3:0] rd_data;
  int checks = 0, failures = 0, model [8];

  link_error_counter #(.NLINK(8), .CNT_W(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_all();
    stb = 0;
    for (int i = 0; i < 8; i++) begin
      rd_sel = 3'(i);
      #1;
      checks++;
      if (int'(rd_data) != model[i]) begin
        failures++;
        $display("FAIL link %0d got %0d exp %0d", i, rd_data, model[i]);
      end
    end
    @(negedge clk);
  endtask

  initial begin
    model = '{default: 0};
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 60; n++) begin
      stb = ($urandom_range(0, 3) != 0);
      err = 8'($urandom) & 8'b0111_1111 | {n[0], 7'b0};
      if (stb) foreach (model[i]) if (err[i] && model[i] < 15) model[i]++;
      @(negedge clk);
      if (n % 10 == 5) read_all();
    end
    stb = 0;
    read_all();
    checks++;
    if (model[7] != 15) begin failures++; $display("FAIL saturation not reached"); end
    clr = 1;
    @(negedge clk) clr = 0;
    model = '{default: 0};
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
