// tb_n64_joybus: runs the transceiver against a behavioural controller on a
// 4 MHz clock. Checks each command byte as the controller decoded it, the
// Poll (32-bit) and Identify/Reset (24-bit) responses, the 140-cycle command
// time (8 bits of 4 us plus a 3 us stop bit), and a timeout with no_resp when
// the controller is unplugged.
`timescale 1ns/1ps
module tb_n64_joybus;
  logic clk = 0, rst = 1;
  always #125 clk = ~clk;                       // 4 MHz
  logic start = 0; logic [7:0] cmd = 0; logic [5:0] rx_bits = 0;
  logic busy, done, no_resp, line_oe, line_in, dev_oe, present = 1;
  logic [31:0] resp;
  int checks = 0, failures = 0;

  assign line_in = !(line_oe | dev_oe);
  n64_joybus dut (.*);
  n64_tb_controller #(.BUTTONS(32'h8040_12F3)) ctl (.line(line_in), .present, .oe(dev_oe));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  task automatic xfer(input logic [7:0] c, input int bits, input logic [31:0] exp, input bit exp_none);
    int t_oe = 0, cyc = 0;
    int n0;
    n0 = ctl.n_cmds;
    @(negedge clk); start = 1; cmd = c; rx_bits = 6'(bits);
    @(negedge clk); start = 0;
    while (!done) begin
      @(posedge clk); #1; cyc++;
      if (line_oe) t_oe = cyc;       // last cycle the console drove the line
      if (cyc > 5000) break;
    end
    if (t_oe < 131 || t_oe > 134) $display("t_oe=%0d", t_oe);
    chk(t_oe >= 131 && t_oe <= 134, "command phase: 8 bits of 16 cycles, then a 4-cycle low stop slot");
    chk(ctl.n_cmds == n0 + 1 && ctl.last_cmd == c, "controller decoded command");
    chk(no_resp == exp_none, "no_resp flag");
    if (!exp_none) chk(resp == exp, "response");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst <= 0;
    repeat (4) @(posedge clk);
    xfer(8'h00, 24, 32'h0005_0001, 0);
    repeat (100) @(posedge clk);
    for (int i = 0; i < 5; i++) begin
      xfer(8'h01, 32, 32'h8040_12F3, 0);
      repeat (50 + $urandom_range(50)) @(posedge clk);
    end
    xfer(8'hFF, 24, 32'h0005_0001, 0);
    repeat (100) @(posedge clk);
    present = 0;
    xfer(8'h01, 32, 32'h0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
