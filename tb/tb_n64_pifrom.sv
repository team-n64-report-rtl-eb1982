// tb_n64_pifrom: loads all 248 doublewords of the 1984-byte boot ROM through
// the load port, then reads them back in random order (one cycle latency).
`timescale 1ns/1ps
module tb_n64_pifrom;
  localparam int WORDS = 1984 / 8;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [7:0] addr = 0, ld_addr = 0;
  logic ld_we = 0;
  logic [63:0] ld_data = 0, rdata;
  int checks = 0, failures = 0;
  logic [63:0] m [WORDS];

  n64_pifrom dut (.*);

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
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); ld_we = 1; ld_addr = 8'(i); ld_data = {$urandom, $urandom}; m[i] = ld_data;
    end
    @(negedge clk); ld_we = 0;
    for (int j = 0; j < 2000; j++) begin
      int i;
      @(negedge clk); i = $urandom_range(WORDS - 1); addr = 8'(i);
      @(posedge clk); #1;
      chk(rdata == m[i], "rom read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
