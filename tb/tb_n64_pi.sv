// tb_n64_pi: peripheral interface with the SD controller and behavioural
// card. Checks that waiting is high until the card is initialised, that
// 8-byte reads at any byte offset return the cartridge image, that a read
// inside the cached sector is answered in the same cycle it is asked, that a
// miss costs one sector fill and a read across a sector boundary two fills.
`timescale 1ns/1ps
module tb_n64_pi;
  import n64_tb_pkg::*;
  logic clk = 0, rst = 1;
  always #10 clk = ~clk;
  logic req = 0, ack, waiting; logic [31:0] addr = 0; logic [63:0] rdata;
  logic sd_ready, sd_error, sd_rd_req, sd_data_valid, sd_rd_done; logic [31:0] sd_rd_addr; logic [7:0] sd_data_byte;
  logic sd_sclk, sd_mosi, sd_miso, sd_cs_n;
  logic [31:0] n_fills, n_splits;
  int checks = 0, failures = 0;

  n64_pi dut (.*);
  n64_sd_spi #(.POWERUP_CYC(500), .INIT_HALF(8'd2)) u_sd (.clk, .rst, .ready(sd_ready), .error(sd_error),
    .rd_req(sd_rd_req), .rd_addr(sd_rd_addr), .data_valid(sd_data_valid), .data_byte(sd_data_byte),
    .rd_done(sd_rd_done), .sd_sclk, .sd_mosi, .sd_miso, .sd_cs_n);
  n64_tb_sdcard card (.sclk(sd_sclk), .mosi(sd_mosi), .cs_n(sd_cs_n), .miso(sd_miso));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // one read; returns the number of cycles until ack (0 = same cycle)
  task automatic rd(input logic [31:0] a, output int lat);
    logic [63:0] e;
    for (int k = 0; k < 8; k++) e[63-8*k -: 8] = sd_byte(a + 32'(k));
    @(negedge clk); req = 1; addr = a; lat = 0;
    #1;
    while (!ack) begin @(negedge clk); lat++; #1; end
    chk(rdata == e, "read data");
    @(negedge clk); req = 0;
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int lat, f0;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (5) @(posedge clk);
    chk(waiting, "waiting while the card initialises");
    while (waiting) @(posedge clk);
    chk(sd_ready, "waiting drops once the card is ready");
    // first read: a miss, one fill
    f0 = n_fills; rd(32'h1000, lat);
    chk(n_fills == f0 + 1 && lat > 0, "miss fills one sector");
    // hits in the same sector, at odd offsets
    for (int i = 0; i < 20; i++) begin
      rd(32'h1000 + 32'($urandom_range(504)), lat);
      chk(lat == 0, "hit answered in the same cycle");
    end
    chk(n_fills == f0 + 1, "no fills on hits");
    // straddling read: 4 bytes in sector 0x1000, 4 in 0x1200
    f0 = n_fills; rd(32'h11FC, lat);
    chk(n_fills == f0 + 1 && n_splits >= 1, "straddle in the cached sector fills the next");
    f0 = n_fills; rd(32'h33FD, lat);
    chk(n_fills == f0 + 2, "straddle from a new sector fills two");
    // random reads anywhere
    for (int i = 0; i < 20; i++) rd(32'($urandom_range(1 << 20)), lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
