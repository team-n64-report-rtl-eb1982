// tb_n64_dcache: write-back data cache on a behavioural memory with random
// latency. Random cached loads and stores (random byte enables) over a 32 KB
// region, four times the cache, are checked against a flat memory model;
// a hit must complete one cycle after the request is seen. Conflicts force
// dirty victims into the write-back buffer (write-backs are counted), and at
// least one hit must be served while the buffer drains. At the end every line is
// flushed with inv and memory itself must equal the model. Uncached
// accesses must bypass the cache.
`timescale 1ns/1ps
module tb_n64_dcache;
  import n64_pkg::*;
  localparam int REGION = 32768;
  logic clk = 0, rst = 1;
  always #10 clk = ~clk;
  mem_req_t c_req = '0, m_req; mem_rsp_t c_rsp, m_rsp;
  logic c_cached = 0, inv = 0; logic [31:0] inv_addr = 0, n_hits, n_misses, n_writebacks;
  int checks = 0, failures = 0;
  logic [63:0] model [REGION / 8];

  n64_dcache dut (.*);

  // hits served while the write-back buffer is still draining
  int n_hit_during_drain = 0;
  always @(posedge clk) if (!rst && dut.wbuf_valid && c_rsp.ack && c_cached) n_hit_during_drain++;
  n64_tb_mem #(.MAX_LAT(3)) mem (.clk, .req(m_req), .rsp(m_rsp));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  task automatic acc(input logic [31:0] a, input bit w, input logic [63:0] wd, input logic [7:0] be,
                     input bit cached, output logic [63:0] d, output int lat);
    @(negedge clk); c_req = '{req: 1'b1, we: w, addr: a, wdata: wd, be: be}; c_cached = cached; lat = 0;
    // the cache may answer combinationally: sample at the falling edge and
    // hold the request through the rising edge that completes it
    do begin @(negedge clk); lat++; end while (!c_rsp.ack);
    d = c_rsp.rdata;
    @(posedge clk); #1;
    c_req = '0;
  endtask

  initial begin
    repeat (600000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [63:0] d; int lat, h0, m0, n_hit_ok;
    n_hit_ok = 0;
    for (int i = 0; i < REGION / 8; i++) begin model[i] = {$urandom, $urandom}; mem.poke(32'(8 * i), model[i]); end
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 5000; i++) begin
      int k; bit w; logic [63:0] wd; logic [7:0] be;
      k = $urandom_range(REGION / 8 - 1); w = $urandom_range(1); wd = {$urandom, $urandom}; be = 8'($urandom);
      h0 = n_hits; m0 = n_misses;
      acc(32'(8 * k), w, wd, be, 1, d, lat);
      if (!w) chk(d == model[k], "load data");
      else for (int b = 0; b < 8; b++) if (be[7-b]) model[k][63-8*b -: 8] = wd[63-8*b -: 8];
      if (n_hits == h0 + 1 && n_misses == m0) begin chk(lat == 1, "hit in one cycle"); n_hit_ok++; end
    end
    chk(n_hit_ok > 100 && n_misses > 100 && n_writebacks > 100, "hits, misses and write-backs seen");
    chk(n_hit_during_drain > 0, "hits go on while the write-back buffer drains");
    // uncached store to a line not in the cache goes straight to memory
    acc(32'h0010_0000, 1, 64'hFEED_FACE_0000_1111, 8'hFF, 0, d, lat);
    chk(mem.peek(32'h0010_0000) == 64'hFEED_FACE_0000_1111, "uncached store bypasses the cache");
    // flush every line, then memory must match
    for (int a = 0; a < 8192; a += 16) begin
      for (int s = 0; s < REGION; s += 8192) begin
        @(negedge clk); inv = 1; inv_addr = 32'(a + s); @(negedge clk); inv = 0;
        // an access afterwards waits for the flush to finish
        acc(32'h0020_0000, 0, 64'h0, 8'hFF, 0, d, lat);
      end
    end
    for (int i = 0; i < REGION / 8; i++) chk(mem.peek(32'(8 * i)) == model[i], "memory after flush");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
