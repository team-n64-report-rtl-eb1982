// tb_n64_fifo: random pushes and pops against a queue model. Checks the
// show-ahead head word, empty/full flags and level every cycle, and that a
// push into a full FIFO or a pop from an empty one changes nothing.
`timescale 1ns/1ps
module tb_n64_fifo;
  localparam int DEPTH = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic push = 0, pop = 0;
  logic [31:0] wdata = 0, rdata;
  logic empty, full;
  logic [3:0] level;
  int checks = 0, failures = 0;
  logic [31:0] q[$];

  n64_fifo #(.WIDTH(32), .DEPTH(DEPTH)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      chk(level == 4'(q.size()), "level");
      chk(empty == (q.size() == 0), "empty");
      chk(full == (q.size() == DEPTH), "full");
      if (q.size() != 0) chk(rdata == q[0], "head");
      // phase-dependent bias so both full and empty are reached often
      push  = ($urandom_range(99) < ((i / 200) % 2 ? 75 : 25));
      pop   = ($urandom_range(99) < ((i / 200) % 2 ? 25 : 75));
      wdata = $urandom;
      begin
        bit acc;
        acc = push && q.size() < DEPTH;
        @(posedge clk); #1;
        if (pop && q.size() != 0) void'(q.pop_front());
        if (acc) q.push_back(wdata);
      end
      push = 0; pop = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
