// tb_n64_pifram: random traffic on both ports of the 64-byte PIF RAM against
// a byte-array model. Port A is the CPU's 64-bit port with byte enables,
// port B the serial interface's 32-bit port; both read with one cycle of
// latency and each sees the other's writes.
`timescale 1ns/1ps
module tb_n64_pifram;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [2:0] a_addr = 0; logic a_we = 0; logic [7:0] a_be = 0;
  logic [63:0] a_wdata = 0, a_rdata;
  logic [3:0] b_addr = 0; logic b_we = 0; logic [31:0] b_wdata = 0, b_rdata;
  int checks = 0, failures = 0;
  logic [7:0] m [64];

  n64_pifram dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [63:0] ea; logic [31:0] eb;
    // initialise through port A
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); a_addr = 3'(i); a_we = 1; a_be = 8'hFF; a_wdata = {$urandom, $urandom};
      for (int k = 0; k < 8; k++) m[8*i+k] = a_wdata[63-8*k -: 8];
    end
    @(negedge clk); a_we = 0;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      a_addr = 3'($urandom); a_we = $urandom_range(1); a_be = 8'($urandom); a_wdata = {$urandom, $urandom};
      b_addr = 4'($urandom); b_we = $urandom_range(1); b_wdata = $urandom;
      if (b_we && a_we && a_addr == 3'(b_addr >> 1)) a_we = 0;  // no same-word collisions
      for (int k = 0; k < 8; k++) ea[63-8*k -: 8] = m[8*a_addr+k];
      for (int k = 0; k < 4; k++) eb[31-8*k -: 8] = m[4*b_addr+k];
      @(posedge clk); #1;
      chk(a_rdata == ea, "port A read");
      chk(b_rdata == eb, "port B read");
      if (a_we) for (int k = 0; k < 8; k++) if (a_be[7-k]) m[8*a_addr+k] = a_wdata[63-8*k -: 8];
      if (b_we) for (int k = 0; k < 4; k++) m[4*b_addr+k] = b_wdata[31-8*k -: 8];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
