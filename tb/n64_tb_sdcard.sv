// n64_tb_sdcard: behavioural SD card (standard capacity, SPI mode) for
// testbenches. Samples MOSI on rising SCLK and changes MISO right after it,
// MSB first. Understands CMD0, CMD55, ACMD41 (busy for the first two tries),
// CMD16 and CMD17; any other command gets R1 = 0x04. CMD17 answers R1, three
// 0xFF bytes, the 0xFE start token, 512 data bytes given by
// n64_tb_pkg::sd_byte(address) and two CRC bytes. Counts the clocks given
// with cs_n high before the first command, and reads served.
`timescale 1ns/1ps
module n64_tb_sdcard (
  input  logic sclk,
  input  logic mosi,
  input  logic cs_n,
  output logic miso
);
  import n64_tb_pkg::*;
  logic [7:0] cur = 8'hFF, rx = 8'h00;
  int bitcnt = 0;
  logic [7:0] q[$];
  logic [7:0] cmd[6];
  int ncmd = 0;
  bit idle = 1, app = 0, selected_once = 0;
  int acmd41_tries = 0;
  int dummy_clks = 0, n_reads = 0, n_bad_crc = 0, n_cmds = 0;
  logic [31:0] last_read_addr = 0;

  assign miso = cs_n ? 1'b1 : cur[7];

  always @(negedge cs_n) begin bitcnt = 0; selected_once = 1; end

  task automatic do_cmd();
    logic [5:0] idx; logic [31:0] arg;
    idx = cmd[0][5:0]; arg = {cmd[1], cmd[2], cmd[3], cmd[4]};
    n_cmds++;
    q.push_back(8'hFF);
    if (idx == 0) begin
      if (cmd[5] != 8'h95) n_bad_crc++;
      idle = 1; q.push_back(8'h01);
    end else if (idx == 55) begin
      app = 1; q.push_back(idle ? 8'h01 : 8'h00); return;
    end else if (idx == 41 && app) begin
      acmd41_tries++;
      if (acmd41_tries >= 3) idle = 0;
      q.push_back(idle ? 8'h01 : 8'h00);
    end else if (idx == 16) begin
      q.push_back(arg == 512 ? 8'h00 : 8'h40);
    end else if (idx == 17 && !idle) begin
      q.push_back(8'h00);
      repeat (3) q.push_back(8'hFF);
      q.push_back(8'hFE);
      for (int i = 0; i < 512; i++) q.push_back(sd_byte(arg + 32'(i)));
      q.push_back(8'hA5); q.push_back(8'h5A);
      n_reads++; last_read_addr = arg;
    end else q.push_back(8'h04);
    app = 0;
  endtask

  always @(posedge sclk) begin
    if (cs_n) begin
      if (!selected_once) dummy_clks++;
    end else begin
      rx = {rx[6:0], mosi};
      if (bitcnt == 7) begin
        bitcnt = 0;
        if (ncmd > 0 || (rx[7:6] == 2'b01 && q.size() == 0)) begin
          cmd[ncmd] = rx; ncmd++;
          if (ncmd == 6) begin ncmd = 0; do_cmd(); end
        end
        cur = q.size() != 0 ? q.pop_front() : 8'hFF;
      end else begin
        bitcnt++;
        cur = {cur[6:0], 1'b1};
      end
    end
  end
endmodule
