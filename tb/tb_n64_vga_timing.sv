// tb_n64_vga_timing: runs the 640x480 timing generator for two frames with a
// pixel enable every other clock (25 MHz from 50 MHz) and measures it: 800
// pixels per line, 525 lines per frame, sync pulse widths of 96 pixels and
// 2 lines, 640x480 active pixels per frame, and frame_start once per frame.
`timescale 1ns/1ps
module tb_n64_vga_timing;
  logic clk = 0, rst = 1, pix_en = 0;
  always #10 clk = ~clk;
  logic [10:0] x, y;
  logic active, hsync, vsync, frame_start;
  int checks = 0, failures = 0;

  n64_vga_timing dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  always_ff @(posedge clk) pix_en <= rst ? 1'b0 : ~pix_en;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint cyc = 0, last_hs_fall = -1, last_vs_fall = -1, last_fs = -1;
    int hs_low = 0, vs_low_lines = 0, act = 0, frames = 0;
    logic hs_p = 1, vs_p = 1;
    int hs_w, hper_ok = 0, hper_bad = 0;
    repeat (4) @(posedge clk);
    rst <= 0;
    while (frames < 3) begin
      @(posedge clk); #1; cyc++;
      if (!pix_en) continue;     // sample once per pixel
      if (active) act++;
      if (!hsync) hs_low++;
      if (hs_p && !hsync) begin
        if (last_hs_fall >= 0) begin
          if (cyc - last_hs_fall == 1600) hper_ok++; else hper_bad++;
        end
        last_hs_fall = cyc;
      end
      if (!hs_p && hsync) begin chk(hs_low == 96, "hsync width 96 px"); hs_low = 0; end
      if (vs_p && !vsync) begin
        if (last_vs_fall >= 0) chk(cyc - last_vs_fall == 1600 * 525, "frame 800x525 px");
        last_vs_fall = cyc;
      end
      if (!vs_p && vsync) chk(cyc - last_vs_fall == 2 * 1600, "vsync 2 lines");
      if (frame_start) begin
        chk(x == 0 && y == 0 && active, "frame_start at (0,0)");
        if (last_fs >= 0) begin chk(act == 640 * 480 + 1, "active pixels per frame"); end
        act = 1; frames++;  // this (0,0) pixel belongs to the new frame
       ; last_fs = cyc;
      end
      hs_p = hsync; vs_p = vsync;
    end
    chk(hper_bad == 0 && hper_ok > 1000, "line period 800 px");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
