// tb_n64_ai: writes stereo samples into the audio interface's FIFO as the CPU
// would (checking the full flag and level), decodes the I2S output with an
// independent receiver, and checks that every sample comes out once, in
// order, one per 1024-clock frame, and that draining the FIFO raises an
// underrun.
`timescale 1ns/1ps
module tb_n64_ai;
  logic clk = 0, rst = 1;
  always #10 clk = ~clk;
  logic push = 0; logic [31:0] wdata = 0;
  logic full, underrun, i2s_mclk, i2s_sclk, i2s_lrck, i2s_sdata;
  logic [4:0] level;
  logic rx_valid; logic [31:0] rx_word;
  int checks = 0, failures = 0;
  logic [31:0] sent[$];
  int n_under = 0, n_rx = 0;
  bit started = 0, saw_full = 0;
  longint cyc = 0, last_rx = -1;

  n64_ai dut (.*);
  n64_tb_i2s_rx rx (.sclk(i2s_sclk), .lrck(i2s_lrck), .sdata(i2s_sdata), .valid(rx_valid), .word(rx_word));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  always @(posedge clk) begin
    cyc++;
    if (!rst && underrun) n_under++;
  end
  always @(posedge rx_valid) begin
    begin
      if (last_rx >= 0) chk(cyc - last_rx == 1024, "one frame per 1024 clocks");
      last_rx = cyc;
      if (rx_word != 0 || sent.size() != 0) begin
        if (sent.size() != 0 && rx_word == sent[0]) begin void'(sent.pop_front()); n_rx++; started = 1; end
        else if (started && sent.size() != 0) chk(0, "sample out of order");
        else if (started && sent.size() == 0) chk(rx_word == 0, "silence after drain");
      end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int pushed = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    // fill until full, then keep it topped up
    while (pushed < 60) begin
      @(negedge clk);
      if (!full) begin
        push = 1; wdata = $urandom | 32'h1; sent.push_back(wdata); pushed++;
      end else push = 0;
      @(posedge clk); #1; push = 0;
      if (full) begin chk(level == 16, "full at 16 samples"); saw_full = 1; end
    end
    wait (sent.size() == 0);
    repeat (1024 * 4) @(posedge clk);
    chk(saw_full, "FIFO filled up");
    chk(n_rx == 60, "all 60 samples played");
    chk(n_under > 0, "underrun after drain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
