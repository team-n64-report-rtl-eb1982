// tb_n64_top: end-to-end test of the whole console at its default
// parameters. The testbench assembles a boot program, loads it into the PIF
// boot ROM while reset is held, and attaches behavioural models of the
// cellular RAM, the SD card holding the cartridge image and two
// controllers. The program jumps from the uncached reset vector into its
// cached copy and then: runs a load/add loop through the data cache
// (forwarding, load-use stalls, taken branches, instruction-cache hits),
// cancels a branch-likely delay slot, multiplies and divides, forces dirty
// data-cache victims out and issues a CACHE write-back-invalidate, waits
// for the cartridge, starts a PI DMA that crosses a cartridge sector (and
// touches RDRAM at once, so the CPU stalls), switches the video origin twice
// (the first switch is ignored), draws eight white lines into the new frame
// buffer, writes twenty audio samples, polls both controllers through PIF
// RAM and the serial interface, copies PIF RAM to RDRAM by SI DMA, and
// writes an end marker. The testbench then checks the stored results, the
// DMA'd cartridge bytes, the controller responses, the decoded I2S samples
// and the white lines on the VGA output, and requires every mechanism
// counter to be non-zero.
`timescale 1ns/1ps
module tb_n64_top;
  import n64_pkg::*;
  import n64_tb_pkg::*;
  logic clk = 0, rst = 1, clk4 = 0, rst4 = 1;
  always #10 clk = ~clk;                         // 50 MHz
  always #125 clk4 = ~clk4;                      // 4 MHz
  logic rom_ld_we = 0; logic [7:0] rom_ld_addr = 0; logic [63:0] rom_ld_data = 0;
  logic [22:0] ram_a; logic [15:0] ram_dq_o, ram_dq_i;
  logic ram_dq_oe, ram_ce_n, ram_oe_n, ram_we_n, ram_ub_n, ram_lb_n, ram_adv_n, ram_cre, ram_clk;
  logic sd_sclk, sd_mosi, sd_miso, sd_cs_n;
  logic [1:0] jb_oe, jb_in, dev_oe;
  logic [3:0] vga_r, vga_g, vga_b; logic vga_hs, vga_vs;
  logic i2s_mclk, i2s_sclk, i2s_lrck, i2s_sdata;
  logic rx_valid; logic [31:0] rx_word;
  int checks = 0, failures = 0;

  n64_top u_top (.*);
  n64_tb_cellram ram (.a(ram_a), .dq_in(ram_dq_o), .dq_oe(ram_dq_oe), .dq_out(ram_dq_i), .ce_n(ram_ce_n),
    .oe_n(ram_oe_n), .we_n(ram_we_n), .ub_n(ram_ub_n), .lb_n(ram_lb_n), .adv_n(ram_adv_n), .cre(ram_cre), .clk(ram_clk));
  n64_tb_sdcard card (.sclk(sd_sclk), .mosi(sd_mosi), .cs_n(sd_cs_n), .miso(sd_miso));
  assign jb_in = ~(jb_oe | dev_oe);
  n64_tb_controller #(.BUTTONS(32'h1234_0A0B)) c0 (.line(jb_in[0]), .present(1'b1), .oe(dev_oe[0]));
  n64_tb_controller #(.BUTTONS(32'h8000_7F81)) c1 (.line(jb_in[1]), .present(1'b1), .oe(dev_oe[1]));
  n64_tb_i2s_rx i2s (.sclk(i2s_sclk), .lrck(i2s_lrck), .sdata(i2s_sdata), .valid(rx_valid), .word(rx_word));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask
  function automatic logic [31:0] ram32(input logic [31:0] a);
    return {ram.rd(23'(a >> 1)), ram.rd(23'(a >> 1) + 23'd1)};
  endfunction

  // ---- program -------------------------------------------------------
  logic [31:0] prog [256];
  int pc = 0;
  function automatic void emit(input logic [31:0] w); prog[pc] = w; pc++; endfunction
  // branch offset from the instruction about to be emitted back to label
  function automatic int back(input int label); return label - (pc + 1); endfunction

  // ---- observers -----------------------------------------------------
  int n_samples = 0, n_sample_ok = 0, n_underrun = 0, white = 0, n_vs = 0;
  bit count_white = 0;
  logic vs_p = 1;
  always @(posedge rx_valid) begin
    if (rx_word != 0) begin
      n_samples++;
      if (rx_word <= 32'd20) n_sample_ok++;
    end
  end
  always @(posedge clk) begin
    if (!rst && u_top.ai_underrun) n_underrun++;
    if (count_white && vga_r == 4'hF && vga_g == 4'hF && vga_b == 4'hF) white++;
    if (vs_p && !vga_vs) n_vs++;
    vs_p = vga_vs;
  end

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int l1, p1, p2, f1, a1, s1, s2;
    for (int i = 0; i < 256; i++) prog[i] = 32'h0;
    // uncached reset vector: jump into the cached (kseg0) copy at index 8
    emit(LUI(1, 16'h9FC0)); emit(ORI(1, 1, 8 * 4)); emit(JR(1)); emit(NOP());
    pc = 8;
    emit(LUI(3, 16'hA000));                     // r3: uncached RDRAM
    emit(LUI(2, 16'h8000));                     // r2: cached RDRAM 0x1000
    emit(ORI(2, 2, 16'h1000));
    emit(ADDIU(7, 0, 20));
    emit(ADDIU(6, 0, 0));
    l1 = pc;
    emit(SW(7, 0, 2));
    emit(LW(8, 0, 2));
    emit(ADDU(6, 6, 8));                        // load-use
    emit(ADDIU(7, 7, -1));
    emit(BNE(7, 0, back(l1)));
    emit(NOP());
    emit(SW(6, 16'h100, 3));                    // 210
    emit(ADDIU(8, 0, 1));
    emit(BEQL(8, 0, 2));
    emit(ADDIU(8, 0, 55));                      // cancelled
    emit(SW(8, 16'h104, 3));                    // 1
    emit(ADDIU(9, 0, 300));
    emit(ADDIU(10, 0, 7));
    emit(MULT(9, 10));
    emit(MFLO(11));                             // 2100
    emit(DIV(11, 10));
    emit(MFLO(12));                             // 300
    emit(SW(12, 16'h108, 3));
    emit(LUI(13, 16'h8000));                    // 0x3000: same data-cache line index
    emit(ORI(13, 13, 16'h3000));
    emit(ADDIU(14, 0, 16'h77));
    emit(SW(14, 0, 13));                        // evicts dirty 0x1000
    emit(LW(15, 0, 2));                         // evicts dirty 0x3000; r15 = 1
    emit(SW(15, 16'h10C, 3));
    emit(CACHE(5'h15, 0, 13));                  // write back + invalidate 0x3000 (not cached now)
    emit(SW(14, 0, 13));                        // 0x3000 dirty again
    emit(CACHE(5'h15, 0, 13));                  // now written back
    emit(LUI(16, 16'hA460));                    // PI registers
    p1 = pc;
    emit(LW(17, 16'h10, 16));                   // wait for the cartridge
    emit(ANDI(17, 17, 2));
    emit(BNE(17, 0, back(p1)));
    emit(NOP());
    emit(LUI(20, 16'h0020)); emit(SW(20, 0, 16));                   // PI_DRAM_ADDR 0x200000
    emit(LUI(20, 16'h1000)); emit(ORI(20, 20, 16'h104)); emit(SW(20, 4, 16)); // PI_CART_ADDR
    emit(ADDIU(20, 0, 255)); emit(SW(20, 16'hC, 16));               // 256 bytes
    emit(LW(21, 16'h100, 3));                   // waits for the DMA
    p2 = pc;
    emit(LW(17, 16'h10, 16));
    emit(ANDI(17, 17, 1));
    emit(BNE(17, 0, back(p2)));
    emit(NOP());
    emit(LUI(22, 16'hA440));                    // VI
    emit(LUI(23, 16'h0018));
    emit(SW(23, 4, 22));                        // ignored
    emit(SW(23, 4, 22));                        // frame buffer now at 0x180000
    emit(LUI(24, 16'hA018));
    emit(ADDIU(25, 0, 640));
    emit(DADDIU(26, 0, -1));
    f1 = pc;
    emit(SD(26, 0, 24));
    emit(ADDIU(24, 24, 8));
    emit(ADDIU(25, 25, -1));
    emit(BNE(25, 0, back(f1)));
    emit(NOP());
    emit(LUI(27, 16'hA450));                    // AI
    emit(ADDIU(28, 0, 20));
    a1 = pc;
    emit(SW(28, 0, 27));
    emit(ADDIU(28, 28, -1));
    emit(BNE(28, 0, back(a1)));
    emit(NOP());
    emit(LUI(29, 16'hBFC0));                    // PIF RAM
    emit(ADDIU(30, 0, 1));
    emit(SW(30, 16'h7C0, 29));                  // poll controller 0
    emit(SW(30, 16'h7C8, 29));                  // poll controller 1
    emit(SW(30, 16'h7FC, 29));                  // go
    s1 = pc;
    emit(LW(30, 16'h7FC, 29));
    emit(ANDI(30, 30, 1));
    emit(BNE(30, 0, back(s1)));
    emit(NOP());
    emit(LUI(1, 16'hA480));                     // SI DMA PIF RAM -> 0x300000
    emit(LUI(4, 16'h0030)); emit(SW(4, 0, 1));
    emit(LUI(4, 16'h1FC0)); emit(ORI(4, 4, 16'h07C0)); emit(SW(4, 4, 1));
    s2 = pc;
    emit(LW(4, 16'h18, 1));
    emit(ANDI(4, 4, 1));
    emit(BNE(4, 0, back(s2)));
    emit(NOP());
    emit(ADDIU(5, 0, 16'h0D0E));
    emit(SW(5, 16'hF00, 3));                    // end marker
    emit(BEQ(0, 0, -1));
    emit(NOP());
    if (pc > 240) $display("program too long");

    // load the boot ROM while reset is held
    for (int i = 0; i < 128; i++) begin
      @(negedge clk); rom_ld_we = 1; rom_ld_addr = 8'(i); rom_ld_data = {prog[2*i], prog[2*i+1]};
    end
    @(negedge clk); rom_ld_we = 0;
    repeat (4) @(posedge clk4);
    rst <= 0; rst4 <= 0;

    while (ram32(32'hF00) != 32'h0D0E) @(posedge clk);
    $display("program done at %0t", $time);
    chk(ram32(32'h100) == 32'd210, "cached load/add loop");
    chk(ram32(32'h104) == 32'd1, "branch-likely slot cancelled");
    chk(ram32(32'h108) == 32'd300, "MULT/DIV");
    chk(ram32(32'h10C) == 32'd1, "data-cache victim written back and reloaded");
    chk(ram32(32'h3000) == 32'h77, "CACHE write-back reached RDRAM");
    begin
      int bad = 0;
      for (int i = 0; i < 256; i += 4) begin
        logic [31:0] e;
        e = {sd_byte(32'h104 + 32'(i)), sd_byte(32'h105 + 32'(i)), sd_byte(32'h106 + 32'(i)), sd_byte(32'h107 + 32'(i))};
        if (ram32(32'h20_0000 + 32'(i)) != e) bad++;
      end
      chk(bad == 0, "PI DMA bytes from the cartridge");
    end
    chk(ram32(32'h30_0004) == 32'h1234_0A0B, "controller 0 buttons via SI DMA");
    chk(ram32(32'h30_000C) == 32'h8000_7F81, "controller 1 buttons via SI DMA");
    chk(ram32(32'h30_003C)[0] == 1'b0, "PIF status: done");
    chk(ram.timing_errors == 0, "cellular RAM timing");
    chk(card.dummy_clks >= 74, "SD card wake-up clocks");
    chk(u_top.fb_base == 32'h0018_0000, "frame buffer moved on second origin write");
    // one whole frame after the drawing
    begin
      int v0;
      v0 = n_vs;
      while (n_vs == v0) @(posedge clk);
      count_white = 1;
      while (n_vs == v0 + 1) @(posedge clk);
      count_white = 0;
    end
    chk(white == 2 * 320 * 8, "eight white lines on screen");
    while (n_underrun == 0) @(posedge clk);
    chk(n_sample_ok >= 16 && n_samples == n_sample_ok, "audio samples on I2S");
    // mechanism counters
    $display("fwd=%0d load_use=%0d taken=%0d likely=%0d md_stall=%0d ic_hit=%0d ic_miss=%0d dc_hit=%0d dc_miss=%0d dc_wb=%0d",
      u_top.n_fwd, u_top.n_load_use, u_top.n_taken, u_top.n_likely_null, u_top.n_md_stall,
      u_top.ic_hits, u_top.ic_misses, u_top.dc_hits, u_top.dc_misses, u_top.dc_wbs);
    $display("dma=%0d dma_stall=%0d pi_fills=%0d pi_splits=%0d si=%0d origin=%0d samples=%0d underrun=%0d white=%0d",
      u_top.n_dma, u_top.n_dma_stall, u_top.pi_fills, u_top.pi_splits, u_top.si_transfers,
      u_top.n_origin_writes, n_samples, n_underrun, white);
    chk(u_top.n_fwd > 0, "forwarding");
    chk(u_top.n_load_use > 0, "load-use stall");
    chk(u_top.n_taken > 0, "taken branches");
    chk(u_top.n_likely_null > 0, "branch-likely cancel");
    chk(u_top.n_md_stall > 0, "multiply/divide stall");
    chk(u_top.ic_hits > 0 && u_top.ic_misses > 0, "instruction cache hits and misses");
    chk(u_top.dc_hits > 0 && u_top.dc_misses > 0, "data cache hits and misses");
    chk(u_top.dc_wbs >= 3, "data cache write-backs");
    chk(u_top.n_dma >= 2, "PI and SI DMA");
    chk(u_top.n_dma_stall > 0, "CPU stalled by DMA");
    chk(u_top.pi_fills > 0, "cartridge sector fills");
    chk(u_top.pi_splits > 0, "cartridge read across sectors");
    chk(u_top.si_transfers >= 2, "controller transfers");
    chk(u_top.n_origin_writes == 2, "video origin writes");
    chk(n_underrun > 0, "audio underrun after the samples");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
