// n64_ai: audio interface. The CPU writes 32-bit stereo samples
// {left[15:0], right[15:0]} to the audio data register; they queue in a FIFO
// and an I2S transmitter plays them on a PCM Pmod DAC (16-bit stereo).
//
// push/wdata come from the memory controller when the data register is
// written. level and full are visible in the audio status register so that
// software can pace itself. The FIFO plus parallel-to-serial structure is
// the report's; the register interface and the FIFO depth are this design's.
`timescale 1ns/1ps
module n64_ai #(
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned MCLK_LOG2  = 1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        push,
  input  logic [31:0] wdata,
  output logic        full,
  output logic [$clog2(FIFO_DEPTH):0] level,
  output logic        underrun,
  output logic        i2s_mclk,
  output logic        i2s_sclk,
  output logic        i2s_lrck,
  output logic        i2s_sdata
);
  logic [31:0] head;
  logic        empty, pop;

  n64_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst, .push, .wdata, .pop, .rdata(head), .empty, .full, .level);

  n64_i2s_tx #(.MCLK_LOG2(MCLK_LOG2)) u_i2s (
    .clk, .rst, .sample(head), .avail(!empty), .pop, .underrun,
    .mclk(i2s_mclk), .sclk(i2s_sclk), .lrck(i2s_lrck), .sdata(i2s_sdata));
endmodule
