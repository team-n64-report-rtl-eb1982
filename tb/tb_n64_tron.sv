// tb_n64_tron: a two-player light-cycle game, of the kind the console was
// demonstrated with, run on the whole system at its default parameters.
//
// The game program is built here from instruction encoders and loaded into
// the PIF boot ROM; it jumps to cached code, moves the frame buffer with two
// VI_ORIGIN writes, and then, for STEPS turns: polls both controllers through
// PIF RAM and the serial interface, moves each rider one pixel in the
// direction of the D-pad button held (right, left, down, up), and draws the
// rider's trail into the frame buffer with a halfword store. Controller 0
// holds D-right, controller 1 D-down, so the red trail must run right from
// (10,20) and the green one down from (50,10). The check reads the frame
// buffer block RAM and counts the trail colours on the VGA output over one
// frame. Turns are paced by the controller poll gap (375 us each).
`timescale 1ns/1ps
module tb_n64_tron;
  import n64_pkg::*;
  import n64_tb_pkg::*;
  localparam int STEPS = 5;
  localparam logic [15:0] RED = 16'hF801, GREEN = 16'h07C1;
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
  int checks = 0, failures = 0;

  n64_top u_top (.*);
  n64_tb_cellram ram (.a(ram_a), .dq_in(ram_dq_o), .dq_oe(ram_dq_oe), .dq_out(ram_dq_i), .ce_n(ram_ce_n),
    .oe_n(ram_oe_n), .we_n(ram_we_n), .ub_n(ram_ub_n), .lb_n(ram_lb_n), .adv_n(ram_adv_n), .cre(ram_cre), .clk(ram_clk));
  n64_tb_sdcard card (.sclk(sd_sclk), .mosi(sd_mosi), .cs_n(sd_cs_n), .miso(sd_miso));
  assign jb_in = ~(jb_oe | dev_oe);
  n64_tb_controller #(.BUTTONS(32'h0100_0000)) c0 (.line(jb_in[0]), .present(1'b1), .oe(dev_oe[0]));
  n64_tb_controller #(.BUTTONS(32'h0400_0000)) c1 (.line(jb_in[1]), .present(1'b1), .oe(dev_oe[1]));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask
  function automatic logic [31:0] ram32(input logic [31:0] a);
    return {ram.rd(23'(a >> 1)), ram.rd(23'(a >> 1) + 23'd1)};
  endfunction
  function automatic logic [15:0] pixel(input int x, input int y);
    int i; i = y * 320 + x;
    return u_top.u_mem.u_fb.mem[i / 4][63 - 16 * (i % 4) -: 16];
  endfunction

  logic [31:0] prog [256];
  int pc = 0;
  function automatic void emit(input logic [31:0] w); prog[pc] = w; pc++; endfunction
  function automatic int back(input int label); return label - (pc + 1); endfunction
  // move (x,y) one step for each D-pad bit set in the poll word in rb
  function automatic void steer(input int rb, input int rx, input int ry);
    int msk [4] = '{16'h0100, 16'h0200, 16'h0400, 16'h0800};
    int reg_ [4]; int inc [4] = '{1, -1, 1, -1};
    reg_ = '{rx, rx, ry, ry};
    for (int k = 0; k < 4; k++) begin
      emit(LUI(12, msk[k])); emit(AND_(13, rb, 12));
      emit(BEQ(13, 0, 2)); emit(NOP());
      emit(ADDIU(reg_[k], reg_[k], inc[k]));
    end
  endfunction
  // frame buffer halfword at (x,y): r24 + 2*(320*y + x)
  function automatic void plot(input int rx, input int ry, input logic [15:0] colour);
    emit(SLL(14, ry, 8)); emit(SLL(15, ry, 6)); emit(ADDU(14, 14, 15)); emit(ADDU(14, 14, rx));
    emit(ADDU(14, 14, 14)); emit(ADDU(14, 14, 24));
    emit(ORI(16, 0, colour)); emit(SH(16, 0, 14));
  endfunction

  int n_red = 0, n_green = 0, n_vs = 0; bit counting = 0; logic vs_p = 1;
  always @(posedge clk) begin
    if (counting && {vga_r, vga_g, vga_b} == {RED[15:12], RED[10:7], RED[5:2]}) n_red++;
    if (counting && {vga_r, vga_g, vga_b} == {GREEN[15:12], GREEN[10:7], GREEN[5:2]}) n_green++;
    if (vs_p && !vga_vs) n_vs++;
    vs_p = vga_vs;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int lp, w1; longint t0, t1;
    for (int i = 0; i < 256; i++) prog[i] = 32'h0;
    emit(LUI(1, 16'h9FC0)); emit(ORI(1, 1, 8 * 4)); emit(JR(1)); emit(NOP());
    pc = 8;
    emit(LUI(22, 16'hA440)); emit(LUI(23, 16'h0018));
    emit(SW(23, 4, 22)); emit(SW(23, 4, 22));   // second origin write takes effect
    emit(LUI(24, 16'hA018));                    // frame buffer, uncached
    emit(LUI(29, 16'hBFC0));                    // PIF RAM at +0x7C0
    emit(ADDIU(5, 0, 10)); emit(ADDIU(6, 0, 20));   // rider 1
    emit(ADDIU(7, 0, 50)); emit(ADDIU(8, 0, 10));   // rider 2
    emit(ADDIU(9, 0, STEPS));
    lp = pc;
    emit(ADDIU(30, 0, 1));
    emit(SW(30, 16'h7C0, 29)); emit(SW(30, 16'h7C8, 29)); emit(SW(30, 16'h7FC, 29));
    w1 = pc;
    emit(LW(30, 16'h7FC, 29)); emit(ANDI(30, 30, 1)); emit(BNE(30, 0, back(w1))); emit(NOP());
    emit(LW(10, 16'h7C4, 29)); emit(LW(11, 16'h7CC, 29));
    steer(10, 5, 6); steer(11, 7, 8);
    plot(5, 6, RED); plot(7, 8, GREEN);
    emit(ADDIU(9, 9, -1)); emit(BNE(9, 0, back(lp))); emit(NOP());
    emit(LUI(3, 16'hA000)); emit(ADDIU(4, 0, 16'h0D0E)); emit(SW(4, 16'hF00, 3));
    emit(BEQ(0, 0, -1)); emit(NOP());
    if (pc > 240) $display("program too long");

    for (int i = 0; i < 128; i++) begin
      @(negedge clk); rom_ld_we = 1; rom_ld_addr = 8'(i); rom_ld_data = {prog[2*i], prog[2*i+1]};
    end
    @(negedge clk); rom_ld_we = 0;
    repeat (4) @(posedge clk4);
    rst <= 0; rst4 <= 0;
    t0 = $time;
    while (ram32(32'hF00) != 32'h0D0E) @(posedge clk);
    t1 = $time;
    $display("game over after %0d us, %0d controller transfers", (t1 - t0) / 1000, u_top.si_transfers);
    begin
      int bad = 0;
      for (int i = 1; i <= STEPS; i++) begin
        if (pixel(10 + i, 20) != RED) bad++;
        if (pixel(50, 10 + i) != GREEN) bad++;
      end
      chk(bad == 0, "both trails drawn where the D-pads steered");
      chk(pixel(10, 20) != RED && pixel(11 + STEPS, 20) != RED, "red trail has the right length");
    end
    chk(u_top.si_transfers == 32'(2 * STEPS), "one poll per rider per turn");
    // turns are paced by the poll gap, 18750 system cycles (375 us)
    chk((t1 - t0) >= longint'(STEPS - 1) * 375_000, "poll gap paces the game");
    begin
      int v0; v0 = n_vs;
      while (n_vs == v0) @(posedge clk);
      counting = 1;
      while (n_vs == v0 + 1) @(posedge clk);
      counting = 0;
    end
    // each frame-buffer pixel is one VGA pixel, held for two clocks
    chk(n_red == 2 * STEPS && n_green == 2 * STEPS, "trails on the VGA output");
    $display("red=%0d green=%0d", n_red, n_green);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
