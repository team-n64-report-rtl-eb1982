// tb_n64_framebuffer: fills the full 320x240 frame buffer through the 64-bit
// write port with byte enables, then reads every doubleword back through
// both ports and compares with a model. Reads have one cycle of latency.
`timescale 1ns/1ps
module tb_n64_framebuffer;
  localparam int WORDS = 320 * 240 / 4;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [14:0] a_addr = 0, b_addr = 0;
  logic a_we = 0; logic [7:0] a_be = 0;
  logic [63:0] a_wdata = 0, a_rdata, b_rdata;
  int checks = 0, failures = 0;
  logic [63:0] m [WORDS];

  n64_framebuffer dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask
  function automatic logic [63:0] pat(input int i);
    return {16'(i * 3), 16'(i ^ 16'h5A5A), 16'(i + 7), 16'(~i)};
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); a_addr = 15'(i); a_we = 1; a_be = 8'hFF; a_wdata = pat(i); m[i] = pat(i);
    end
    // partial writes with random byte enables
    for (int j = 0; j < 2000; j++) begin
      int i;
      @(negedge clk); i = $urandom_range(WORDS - 1);
      a_addr = 15'(i); a_we = 1; a_be = 8'($urandom); a_wdata = {$urandom, $urandom};
      for (int k = 0; k < 8; k++) if (a_be[7-k]) m[i][63-8*k -: 8] = a_wdata[63-8*k -: 8];
    end
    @(negedge clk); a_we = 0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); a_addr = 15'(i); b_addr = 15'(WORDS - 1 - i);
      @(posedge clk); #1;
      chk(a_rdata == m[i], "port A");
      chk(b_rdata == m[WORDS - 1 - i], "port B");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
