// n64_framebuffer: the 320x240 frame buffer held in true dual-port block RAM.
//
// Each pixel is 16 bits (5 bits each of red, green, blue and one spare bit),
// so the buffer is 320*240*2 = 153,600 bytes, stored as 19,200 big-endian
// doublewords of four pixels (pixel 0 in bits 63:48). Port A belongs to the
// memory controller (CPU writes and reads with byte enables); port B is the
// read-only port of the video interface. Both read synchronously: data
// appears the cycle after the address. Moving the frame buffer out of the
// cellular RAM into block RAM follows the report; the doubleword organisation
// is this design's choice so that one bus access is one RAM access.
`timescale 1ns/1ps
module n64_framebuffer #(
  parameter int unsigned WIDTH  = 320,
  parameter int unsigned HEIGHT = 240,
  localparam int unsigned WORDS = WIDTH * HEIGHT / 4,
  localparam int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic [AW-1:0] a_addr,
  input  logic          a_we,
  input  logic [7:0]    a_be,
  input  logic [63:0]   a_wdata,
  output logic [63:0]   a_rdata,
  input  logic [AW-1:0] b_addr,
  output logic [63:0]   b_rdata
);
  logic [63:0] mem [WORDS];

  always_ff @(posedge clk) begin
    for (int k = 0; k < 8; k++)
      if (a_we && a_be[7-k]) mem[a_addr][63-8*k -: 8] <= a_wdata[63-8*k -: 8];
    a_rdata <= mem[a_addr];
  end

  always_ff @(posedge clk) b_rdata <= mem[b_addr];
endmodule
