// tb_n64_i2s_tx: feeds stereo samples to the I2S transmitter, decodes the
// serial stream with an independent receiver and compares words in order.
// Checks the clock ratios (mclk = clk/4, sclk = mclk/8, lrck = sclk/32, so
// one frame per 1024 clocks: 48.8 kHz at 50 MHz), one pop per frame, and an
// underrun pulse plus a silent frame when no sample is available.
`timescale 1ns/1ps
module tb_n64_i2s_tx;
  logic clk = 0, rst = 1;
  always #10 clk = ~clk;
  logic [31:0] sample; logic avail, pop, underrun, mclk, sclk, lrck, sdata;
  logic rx_valid; logic [31:0] rx_word;
  int checks = 0, failures = 0;
  logic [31:0] q[$], exp_q[$];
  bit hold = 0;
  int n_under = 0, n_words = 0;

  n64_i2s_tx dut (.*);
  n64_tb_i2s_rx rx (.sclk, .lrck, .sdata, .valid(rx_valid), .word(rx_word));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  assign avail  = !hold && q.size() != 0;
  assign sample = q.size() != 0 ? q[0] : 32'h0;

  longint cyc = 0, last_pop = -1, mclk_rise = -1, sclk_rise = -1, lr_rise = -1;
  logic mclk_p = 0, sclk_p = 0, lr_p = 0;
  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (pop) begin
        chk(avail, "pop only when available");
        if (last_pop >= 0 && !underrun) chk(cyc - last_pop == 1024 || cyc - last_pop == 2048, "pop period");
        last_pop = cyc;
        exp_q.push_back(q.pop_front());
      end
      if (underrun) begin n_under++; exp_q.push_back(32'h0); last_pop = cyc; end
      if (mclk && !mclk_p) begin if (mclk_rise >= 0) chk(cyc - mclk_rise == 4, "mclk period 4"); mclk_rise = cyc; end
      if (sclk && !sclk_p) begin if (sclk_rise >= 0) chk(cyc - sclk_rise == 32, "sclk period 32"); sclk_rise = cyc; end
      if (lrck && !lr_p) begin if (lr_rise >= 0) chk(cyc - lr_rise == 1024, "lrck period 1024"); lr_rise = cyc; end
      mclk_p = mclk; sclk_p = sclk; lr_p = lrck;
    end
  end

  always @(posedge rx_valid) begin
    n_words++;
    if (exp_q.size() == 0) chk(0, "word without a sample");
    else chk(rx_word == exp_q.pop_front(), "decoded word");
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 40; i++) q.push_back($urandom);
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (1024 * 20) @(posedge clk);
    hold = 1;                                 // starve it for three frames
    repeat (1024 * 3) @(posedge clk);
    hold = 0;
    repeat (1024 * 30) @(posedge clk);
    chk(n_under >= 2, "underrun seen");
    chk(n_words >= 45, "words decoded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
