// n64_i2s_tx: I2S parallel-to-serial converter for a 16-bit stereo PCM DAC.
//
// One free-running counter makes all clocks: mclk = clk / 2^(MCLK_LOG2+1),
// sclk = mclk / 8 and lrck = sclk / 32, so a frame is 32 serial bit periods
// (16 left, lrck low, then 16 right, lrck high) and mclk = 256 x sample rate.
// With a 50 MHz clock and MCLK_LOG2 = 1 that is 12.5 MHz, 1.5625 MHz and
// 48.8 kHz. Data changes on the falling edge of sclk and follows the I2S
// rule of starting one bit period after lrck changes, MSB first. At the
// start of each frame one sample {left[15:0], right[15:0]} is taken from the
// show-ahead source (pop pulses); if the source is empty, silence is sent and
// underrun pulses. The report says only that 16-bit PCM goes through a FIFO
// into an I2S parallel-to-serial converter; clock ratios are this design's.
`timescale 1ns/1ps
module n64_i2s_tx #(
  parameter int unsigned MCLK_LOG2 = 1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] sample,
  input  logic        avail,
  output logic        pop,
  output logic        underrun,
  output logic        mclk,
  output logic        sclk,
  output logic        lrck,
  output logic        sdata
);
  localparam int unsigned K = MCLK_LOG2;
  localparam int unsigned CW = K + 9;
  logic [CW-1:0] cnt;
  logic [31:0]   sh;

  assign mclk = cnt[K];
  assign sclk = cnt[K+3];
  assign lrck = cnt[K+8];

  // the cycle before sclk falls: low bits all ones and sclk high
  wire sclk_fall = (cnt[K+3:0] == '1);
  wire [CW-1:0] cnt_n = cnt + 1'b1;
  wire [4:0] pos_n = cnt_n[K+8:K+4];   // bit position after the fall

  always_ff @(posedge clk) begin
    pop <= 1'b0;
    underrun <= 1'b0;
    if (rst) begin
      cnt <= '0; sh <= '0; sdata <= 1'b0;
    end else begin
      cnt <= cnt_n;
      if (sclk_fall) begin
        if (pos_n == 5'd1) begin
          if (avail) begin
            sdata <= sample[31];
            sh    <= {sample[30:0], 1'b0};
            pop   <= 1'b1;
          end else begin
            sdata <= 1'b0; sh <= '0; underrun <= 1'b1;
          end
        end else begin
          sdata <= sh[31];
          sh    <= {sh[30:0], 1'b0};
        end
      end
    end
  end
endmodule
