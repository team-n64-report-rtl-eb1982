// tb_n64_dma: DMA engine on a behavioural bus memory with random latency.
// Copies blocks of several lengths and checks the destination, that nothing
// past the rounded-up length is written, the chunk count (32 bytes each),
// and the bus pattern: within a chunk all reads come before all writes and
// a chunk has at most four beats of each.
`timescale 1ns/1ps
module tb_n64_dma;
  import n64_pkg::*;
  logic clk = 0, rst = 1;
  always #10 clk = ~clk;
  logic start = 0, busy, done; logic [31:0] src = 0, dst = 0, len = 0, n_chunks;
  mem_req_t m_req; mem_rsp_t m_rsp;
  int checks = 0, failures = 0;

  n64_dma dut (.*);
  n64_tb_mem #(.MAX_LAT(3)) mem (.clk, .req(m_req), .rsp(m_rsp));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // bus pattern monitor
  int rd_run = 0, wr_run = 0, bad_pattern = 0;
  always @(posedge clk) if (m_rsp.ack) begin
    if (!m_req.we) begin
      if (wr_run != 0) begin wr_run = 0; rd_run = 0; end
      rd_run++; if (rd_run > 4) bad_pattern++;
    end else begin
      wr_run++; if (wr_run > 4 || wr_run > rd_run) bad_pattern++;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int lens[5] = '{8, 32, 64, 200, 1024};
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 5; t++) begin
      logic [31:0] s, d; int c0, nw;
      s = 32'h0010_0000 + 32'(t) * 32'h1000; d = 32'h0020_0000 + 32'(t) * 32'h1000;
      for (int i = 0; i < 1100; i += 8) begin mem.poke(s + 32'(i), {$urandom, $urandom}); mem.poke(d + 32'(i), 64'h0); end
      c0 = n_chunks; nw = (lens[t] + 7) / 8;
      @(negedge clk); start = 1; src = s; dst = d; len = 32'(lens[t]);
      @(negedge clk); start = 0;
      chk(busy, "busy while copying");
      @(posedge clk); while (!done) @(posedge clk);
      #1; chk(!busy, "idle after done");
      for (int i = 0; i < nw; i++) chk(mem.peek(d + 32'(8 * i)) == mem.peek(s + 32'(8 * i)), "copied doubleword");
      chk(mem.peek(d + 32'(8 * nw)) == 64'h0, "nothing written past the end");
      chk(n_chunks - c0 == (lens[t] + 31) / 32, "32-byte chunks");
    end
    chk(bad_pattern == 0, "reads then writes, four beats per chunk");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
