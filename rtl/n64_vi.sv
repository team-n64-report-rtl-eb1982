// n64_vi: video interface. Reads the frame buffer for the VGA driver and
// turns 16-bit N64 pixels into 12-bit VGA colour.
//
// The 320x240 picture is shown unscaled in the centre of a 640x480 screen
// (offset X_OFS, Y_OFS); outside it the screen is black. For the pixel under
// the beam the interface computes the frame-buffer doubleword (4 pixels per
// doubleword, pixel 0 in bits 63:48) and reads it through the frame buffer's
// read port. A pixel is r[15:11] g[10:6] b[5:1] plus a spare bit; VGA gets
// the top 4 bits of each colour. Syncs and colour leave the module two clock
// cycles after the timing generator's coordinates, so all stay aligned.
// Centring, the 320x240 size and the 5:5:5:1 pixel follow the report; the
// bit order inside a pixel and the 4-bit truncation are this design's
// choices.
`timescale 1ns/1ps
module n64_vi #(
  parameter int unsigned FB_W  = 320,
  parameter int unsigned FB_H  = 240,
  parameter int unsigned X_OFS = 160,
  parameter int unsigned Y_OFS = 120,
  localparam int unsigned AW   = $clog2(FB_W * FB_H / 4)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [10:0]   x,
  input  logic [10:0]   y,
  input  logic          active,
  input  logic          hsync_in,
  input  logic          vsync_in,
  output logic [AW-1:0] fb_addr,
  input  logic [63:0]   fb_rdata,
  output logic [3:0]    vga_r,
  output logic [3:0]    vga_g,
  output logic [3:0]    vga_b,
  output logic          vga_hs,
  output logic          vga_vs
);
  logic        inwin, inwin_d;
  logic [1:0]  sel_d;
  logic        hs_d, vs_d;
  logic [31:0] pix_idx;

  always_comb begin
    inwin = active && (32'(x) >= X_OFS) && (32'(x) < X_OFS + FB_W) &&
            (32'(y) >= Y_OFS) && (32'(y) < Y_OFS + FB_H);
    pix_idx = inwin ? ((32'(y) - Y_OFS) * FB_W + (32'(x) - X_OFS)) : 32'd0;
    fb_addr = AW'(pix_idx >> 2);
  end

  logic [15:0] pix;
  always_comb pix = fb_rdata[63 - 16*sel_d -: 16];

  always_ff @(posedge clk) begin
    if (rst) begin
      inwin_d <= 1'b0; sel_d <= '0; hs_d <= 1'b1; vs_d <= 1'b1;
      vga_r <= '0; vga_g <= '0; vga_b <= '0; vga_hs <= 1'b1; vga_vs <= 1'b1;
    end else begin
      inwin_d <= inwin;
      sel_d   <= pix_idx[1:0];
      hs_d    <= hsync_in;
      vs_d    <= vsync_in;
      vga_hs  <= hs_d;
      vga_vs  <= vs_d;
      vga_r   <= inwin_d ? pix[15:12] : 4'h0;
      vga_g   <= inwin_d ? pix[10:7]  : 4'h0;
      vga_b   <= inwin_d ? pix[5:2]   : 4'h0;
    end
  end
endmodule
