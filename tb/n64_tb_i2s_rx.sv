// n64_tb_i2s_rx: I2S receiver for testbenches. Shifts sdata in on each rising
// sclk edge and, at the first rising edge after lrck falls, reports the
// 32-bit stereo frame just finished (left in bits 31:16). The first frame
// after reset is incomplete and is not reported.
`timescale 1ns/1ps
module n64_tb_i2s_rx (
  input  logic sclk,
  input  logic lrck,
  input  logic sdata,
  output logic        valid,
  output logic [31:0] word
);
  logic [31:0] sr = '0;
  logic lr_p = 1'b1;
  bit first = 1'b1;
  initial begin valid = 0; word = 0; end
  always @(posedge sclk) begin
    valid <= 1'b0;
    if (lr_p && !lrck) begin
      if (!first) begin word <= {sr[30:0], sdata}; valid <= 1'b1; end
      first = 1'b0;
    end
    sr <= {sr[30:0], sdata};
    lr_p <= lrck;
  end
endmodule
