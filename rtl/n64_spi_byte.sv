// n64_spi_byte: SPI mode-0 byte shifter used by the SD card controller.
//
// start loads tx and shifts it out MSB first on mosi while shifting miso in;
// sclk idles low, the card samples mosi on the rising edge and the byte from
// miso is sampled here on the rising edge too. Each half period of sclk lasts
// half_div+1 clock cycles, so the caller picks the slow identification clock
// or the fast transfer clock byte by byte. done pulses for one cycle with rx
// valid; a byte takes 16*(half_div+1) cycles.
`timescale 1ns/1ps
module n64_spi_byte (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] half_div,
  input  logic       start,
  input  logic [7:0] tx,
  output logic       busy,
  output logic       done,
  output logic [7:0] rx,
  output logic       sclk,
  output logic       mosi,
  input  logic       miso
);
  logic [7:0] sh, cnt;
  logic [2:0] bitn;

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst) begin
      busy <= 1'b0; sclk <= 1'b0; mosi <= 1'b1; sh <= '0; cnt <= '0;
      bitn <= '0; rx <= '0;
    end else if (!busy) begin
      if (start) begin
        busy <= 1'b1; sh <= tx; mosi <= tx[7]; bitn <= '0; cnt <= '0;
        sclk <= 1'b0;
      end
    end else if (cnt != half_div) begin
      cnt <= cnt + 8'd1;
    end else begin
      cnt <= '0;
      if (!sclk) begin
        sclk <= 1'b1;
        rx   <= {rx[6:0], miso};
      end else begin
        sclk <= 1'b0;
        if (bitn == 3'd7) begin
          busy <= 1'b0; done <= 1'b1; mosi <= 1'b1;
        end else begin
          bitn <= bitn + 3'd1;
          mosi <= sh[6];
          sh   <= {sh[6:0], 1'b0};
        end
      end
    end
  end
endmodule
