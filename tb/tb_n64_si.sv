// tb_n64_si: serial interface with PIF RAM, two 4 MHz transceivers and two
// behavioural controllers, the second one unplugged. The testbench writes
// controller commands into PIF RAM as the CPU would, starts the interface and
// checks: the CIC seed in word 9 after reset, the Identify and Poll responses
// in words 1 and 3, the status word (pending bit cleared, no-answer flag for
// controller 1), and that controller 0 is not addressed again before the
// poll gap has passed.
`timescale 1ns/1ps
module tb_n64_si;
  localparam int GAP = 2000;
  logic clk = 0, rst = 1, clk4 = 0, rst4 = 1;
  always #10 clk = ~clk;
  always #125 clk4 = ~clk4;
  logic start = 0, busy;
  logic [3:0] ram_addr; logic ram_we; logic [31:0] ram_wdata, ram_rdata;
  logic [1:0] jb_oe, jb_in, dev_oe;
  logic [31:0] n_transfers;
  logic [2:0] a_addr = 0; logic a_we = 0; logic [7:0] a_be = 0; logic [63:0] a_wdata = 0, a_rdata;
  int checks = 0, failures = 0;

  assign jb_in = ~(jb_oe | dev_oe);
  n64_si #(.NUM_CTRL(2), .POLL_GAP(GAP)) dut (.*);
  n64_pifram u_ram (.clk, .a_addr, .a_we, .a_be, .a_wdata, .a_rdata,
                    .b_addr(ram_addr), .b_we(ram_we), .b_wdata(ram_wdata), .b_rdata(ram_rdata));
  n64_tb_controller #(.BUTTONS(32'h1234_0A0B)) c0 (.line(jb_in[0]), .present(1'b1), .oe(dev_oe[0]));
  n64_tb_controller #(.BUTTONS(32'h0)) c1 (.line(jb_in[1]), .present(1'b0), .oe(dev_oe[1]));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask
  task automatic wr_word(input int w, input logic [31:0] d);
    @(negedge clk); a_addr = 3'(w >> 1); a_we = 1; a_be = w[0] ? 8'h0F : 8'hF0; a_wdata = {d, d};
    @(negedge clk); a_we = 0;
  endtask
  task automatic rd_word(input int w, output logic [31:0] d);
    @(negedge clk); a_addr = 3'(w >> 1);
    @(posedge clk); #1; d = w[0] ? a_rdata[31:0] : a_rdata[63:32];
  endtask
  task automatic run();
    wr_word(15, 32'h1);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    @(posedge clk); while (busy) @(posedge clk);
  endtask

  longint cyc = 0, t_c0 = -1, min_gap = 1 << 30;
  int n0_p = 0;
  always @(posedge clk) begin
    cyc++;
    if (c0.n_cmds != n0_p) begin
      if (t_c0 >= 0 && cyc - t_c0 < min_gap) min_gap = cyc - t_c0;
      t_c0 = cyc; n0_p = c0.n_cmds;
    end
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] d;
    repeat (4) @(posedge clk4);
    rst <= 0; rst4 <= 0;
    repeat (20) @(posedge clk);
    rd_word(9, d); chk(d == 32'h0000_3F3F, "CIC seed in PIF RAM");
    // Identify on controller 0, Poll on (absent) controller 1
    wr_word(0, 32'h0); wr_word(1, 32'hDEAD_BEEF);
    wr_word(2, 32'h1); wr_word(3, 32'hDEAD_BEEF);
    run();
    rd_word(1, d);  chk(d == 32'h0005_0001, "identify response");
    rd_word(15, d); chk(d[0] == 0 && d[9] == 1 && d[8] == 0, "status: done, ctrl 1 absent");
    chk(c0.last_cmd == 8'h00, "controller 0 saw identify");
    // back-to-back polls: the gap must hold them apart
    for (int i = 0; i < 3; i++) begin
      wr_word(0, 32'h1);
      run();
      rd_word(1, d); chk(d == 32'h1234_0A0B, "poll response");
      rd_word(15, d); chk(d[0] == 0 && d[8] == 0, "status after poll");
    end
    chk(c0.n_cmds == 4, "four commands reached controller 0");
    chk(c1.n_cmds == 4, "four commands reached controller 1");
    chk(min_gap >= GAP, "poll gap respected");
    chk(n_transfers == 8, "transfer counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
