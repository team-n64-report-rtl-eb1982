// tb_n64_icache: instruction cache on a behavioural memory with random
// latency. Random cached and uncached doubleword reads over a 64 KB region
// (four times the cache, so lines conflict) are compared with memory. A hit
// must be answered one cycle after the request is seen; uncached reads must
// always go to memory. Then a line is changed behind the cache: the cache
// keeps returning the old word until inv clears the line.
`timescale 1ns/1ps
module tb_n64_icache;
  import n64_pkg::*;
  logic clk = 0, rst = 1;
  always #10 clk = ~clk;
  mem_req_t c_req = '0, m_req; mem_rsp_t c_rsp, m_rsp;
  logic c_cached = 0, inv = 0; logic [31:0] inv_addr = 0, n_hits, n_misses;
  int checks = 0, failures = 0;

  n64_icache dut (.*);
  n64_tb_mem #(.MAX_LAT(3)) mem (.clk, .req(m_req), .rsp(m_rsp));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  task automatic rd(input logic [31:0] a, input bit cached, output logic [63:0] d, output int lat);
    @(negedge clk); c_req = '{req: 1'b1, we: 1'b0, addr: a, wdata: '0, be: 8'hFF}; c_cached = cached; lat = 0;
    // the cache may answer combinationally: sample at the falling edge and
    // hold the request through the rising edge that completes it
    do begin @(negedge clk); lat++; end while (!c_rsp.ack);
    d = c_rsp.rdata;
    @(posedge clk); #1;
    c_req = '0;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [63:0] d; int lat, h0, m0, acc0, n_hit_lat = 0;
    for (int i = 0; i < 65536; i += 8) mem.poke(32'(i), {$urandom, $urandom});
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] a; bit c;
      a = 32'($urandom_range(65535)) & ~32'h7; c = ($urandom_range(9) != 0);
      h0 = n_hits; acc0 = mem.n_acc;
      rd(a, c, d, lat);
      chk(d == mem.peek(a), "read data");
      if (!c) chk(mem.n_acc == acc0 + 1, "uncached read goes to memory");
      if (c && n_hits == h0 + 1) begin chk(lat == 1, "hit in one cycle"); n_hit_lat++; end
    end
    chk(n_hit_lat > 100 && n_misses > 100, "hits and misses seen");
    // stale line and invalidation
    rd(32'h100, 1, d, lat); rd(32'h100, 1, d, lat);
    mem.poke(32'h100, 64'h0123_4567_89AB_CDEF);
    rd(32'h100, 1, d, lat); chk(d != 64'h0123_4567_89AB_CDEF, "cached copy until invalidated");
    @(negedge clk); inv = 1; inv_addr = 32'h108; @(negedge clk); inv = 0;
    m0 = n_misses;
    rd(32'h100, 1, d, lat); chk(d == 64'h0123_4567_89AB_CDEF && n_misses == m0 + 1, "refetched after inv");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
