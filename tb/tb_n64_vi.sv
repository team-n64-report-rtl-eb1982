// tb_n64_vi: video path test. A VGA timing generator drives the video
// interface, which reads a 320x240 frame buffer filled with a known pattern.
// Every clock of one whole 640x480 frame the VGA colour and syncs are
// compared with the expected value for the coordinates of two clocks
// earlier: the pattern pixel (top 4 bits of r/g/b) inside the centred
// window at (160,120), black outside it.
`timescale 1ns/1ps
module tb_n64_vi;
  localparam int W = 320, H = 240;
  logic clk = 0, rst = 1, pix_en = 0;
  always #10 clk = ~clk;
  logic [10:0] x, y; logic active, hsync, vsync, frame_start;
  logic [14:0] fb_addr, a_addr = 0; logic [63:0] fb_rdata, a_rdata; logic a_we = 0; logic [63:0] a_wdata = 0;
  logic [3:0] vga_r, vga_g, vga_b; logic vga_hs, vga_vs;
  int checks = 0, failures = 0, in_win = 0;

  n64_vga_timing u_t (.clk, .rst, .pix_en, .x, .y, .active, .hsync, .vsync, .frame_start);
  n64_framebuffer u_fb (.clk, .a_addr, .a_we, .a_be(8'hFF), .a_wdata, .a_rdata,
                        .b_addr(fb_addr), .b_rdata(fb_rdata));
  n64_vi dut (.clk, .rst, .x, .y, .active, .hsync_in(hsync), .vsync_in(vsync), .fb_addr, .fb_rdata,
              .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok && failures < 20) $display("FAIL %s @%0t", what, $time);
    if (!ok) failures++;
  endtask
  function automatic logic [15:0] pix(input int i);
    return 16'(i * 37 ^ (i >> 3));
  endfunction

  always_ff @(posedge clk) pix_en <= rst ? 1'b0 : ~pix_en;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [10:0] hx[2], hy[2]; logic ha[2], hh[2], hv[2];
    for (int i = 0; i < W * H / 4; i++) begin
      @(negedge clk); a_we = 1; a_addr = 15'(i);
      a_wdata = {pix(4*i), pix(4*i+1), pix(4*i+2), pix(4*i+3)};
    end
    @(negedge clk); a_we = 0;
    rst = 0;
    for (int k = 0; k < 2; k++) begin hx[k] = 0; hy[k] = 0; ha[k] = 0; hh[k] = 1; hv[k] = 1; end
    // wait for a frame start, then check one full frame
    @(posedge clk); while (!frame_start) @(posedge clk);
    for (int c = 0; c < 800 * 525 * 2; c++) begin
      #1;
      begin
        bit win; logic [15:0] p; logic [3:0] er, eg, eb;
        win = ha[1] && hx[1] >= 160 && hx[1] < 480 && hy[1] >= 120 && hy[1] < 360;
        p = win ? pix((int'(hy[1]) - 120) * W + int'(hx[1]) - 160) : 16'h0;
        er = win ? p[15:12] : 4'h0; eg = win ? p[10:7] : 4'h0; eb = win ? p[5:2] : 4'h0;
        if (c >= 2) begin
          chk({vga_r, vga_g, vga_b} == {er, eg, eb}, "pixel colour");
          chk(vga_hs == hh[1] && vga_vs == hv[1], "sync alignment");
          if (win) in_win++;
        end
      end
      hx[1] = hx[0]; hy[1] = hy[0]; ha[1] = ha[0]; hh[1] = hh[0]; hv[1] = hv[0];
      hx[0] = x; hy[0] = y; ha[0] = active; hh[0] = hsync; hv[0] = vsync;
      @(posedge clk);
    end
    chk(in_win == 2 * W * H, "window pixels shown (two clocks each)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
