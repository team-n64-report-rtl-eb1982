// tb_n64_sd_spi: SD controller against the behavioural card. Checks that the
// card sees no clock before the power-up wait, at least 74 clocks with cs_n
// high before the first command, a correct CMD0 CRC, the initialisation
// ending in ready, and then several 512-byte block reads whose bytes,
// count and rd_done pulse are compared with the card image. Also checks the
// byte time on the fast clock: 16 system clocks of SPI clocking per byte at
// FAST_HALF = 0 plus up to 4 clocks of byte-to-byte handshake.
`timescale 1ns/1ps
module tb_n64_sd_spi;
  import n64_tb_pkg::*;
  localparam int PWR = 2000;
  logic clk = 0, rst = 1;
  always #10 clk = ~clk;
  logic ready, error, rd_req = 0, data_valid, rd_done, sd_sclk, sd_mosi, sd_miso, sd_cs_n;
  logic [31:0] rd_addr = 0; logic [7:0] data_byte;
  int checks = 0, failures = 0;

  n64_sd_spi #(.POWERUP_CYC(PWR), .INIT_HALF(8'd3)) dut (.*);
  n64_tb_sdcard card (.sclk(sd_sclk), .mosi(sd_mosi), .cs_n(sd_cs_n), .miso(sd_miso));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  longint cyc = 0, first_sclk = -1;
  always @(posedge clk) begin
    cyc++;
    if (!rst && sd_sclk && first_sclk < 0) first_sclk = cyc;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk); while (!ready && !error) @(posedge clk);
    chk(!error, "init without error");
    chk(first_sclk >= PWR, "power-up wait before first clock");
    chk(card.dummy_clks >= 74, "74+ clocks with cs_n high");
    chk(card.n_bad_crc == 0, "CMD0 CRC");
    chk(card.acmd41_tries == 3, "ACMD41 repeated until ready");
    for (int r = 0; r < 4; r++) begin
      logic [31:0] a;
      int n, bad;
      longint t_first, t_last;
      n = 0; bad = 0; t_first = 0; t_last = 0;
      a = 32'($urandom_range(4000)) * 512;
      @(negedge clk); rd_req = 1; rd_addr = a;
      @(negedge clk); rd_req = 0;
      while (!rd_done) begin
        @(posedge clk); #1;
        if (data_valid) begin
          if (data_byte != sd_byte(a + 32'(n))) bad++;
          if (n == 0) t_first = cyc; t_last = cyc;
          n++;
        end
        if (error) break;
      end
      chk(n == 512, "512 bytes per block");
      chk(bad == 0, "block data");
      chk(card.last_read_addr == a, "CMD17 address");
      chk(t_last - t_first >= 511 * 16 && t_last - t_first <= 511 * 20, "16-20 clocks per byte on the fast clock");
    end
    chk(card.n_reads == 4, "four reads");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
