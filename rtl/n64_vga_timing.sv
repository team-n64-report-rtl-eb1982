// n64_vga_timing: VGA sync generator for 640x480 at 60 Hz.
//
// A pixel advances on every cycle with pix_en high (25 MHz pixels from a
// 50 MHz clock with pix_en every second cycle). x and y count the whole
// frame including blanking; active is high inside the 640x480 picture.
// hsync and vsync are active low. The report only says the VGA driver needs
// RGB, hsync and vsync at its 320x240 picture; the industry-standard
// 640x480 timing used as parameter defaults is this design's choice.
`timescale 1ns/1ps
module n64_vga_timing #(
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned H_FP     = 16,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BP     = 48,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FP     = 10,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BP     = 33,
  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP,
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        pix_en,
  output logic [10:0] x,
  output logic [10:0] y,
  output logic        active,
  output logic        hsync,
  output logic        vsync,
  output logic        frame_start   // one pix_en-qualified cycle at (0,0)
);
  always_ff @(posedge clk) begin
    if (rst) begin
      x <= '0; y <= '0;
    end else if (pix_en) begin
      if (32'(x) == H_TOTAL - 1) begin
        x <= '0;
        y <= (32'(y) == V_TOTAL - 1) ? '0 : y + 11'd1;
      end else x <= x + 11'd1;
    end
  end

  assign active = (32'(x) < H_ACTIVE) && (32'(y) < V_ACTIVE);
  assign hsync  = !((32'(x) >= H_ACTIVE + H_FP) && (32'(x) < H_ACTIVE + H_FP + H_SYNC));
  assign vsync  = !((32'(y) >= V_ACTIVE + V_FP) && (32'(y) < V_ACTIVE + V_FP + V_SYNC));
  assign frame_start = pix_en && (x == 0) && (y == 0);
endmodule
