// n64_sd_spi: SD card controller in SPI mode, for standard-capacity cards
// (up to 2 GB, byte addressing), with 512-byte block reads.
//
// Card pins (microSD in SPI mode): cs_n on DAT3, mosi on CMD (card DI),
// sclk on CLK, miso on DAT0 (card DO); ports are named from the controller's
// side as master-out/master-in. After reset the controller waits
// POWERUP_CYC cycles (1 ms at 50 MHz) for the card to power up, sends 80
// clocks with cs_n high, then CMD0 (expects idle, R1 = 0x01), repeats
// CMD55 + ACMD41 until the card leaves idle (R1 = 0x00) and sets the block
// length to 512 bytes with CMD16; all this at the slow clock (INIT_HALF).
// ready then rises and the fast clock (FAST_HALF) is used. A read (rd_req
// with a 512-aligned byte address) sends CMD17, waits for the 0xFE start
// token, streams the 512 bytes out one per data_valid pulse, drops the two
// CRC bytes and pulses rd_done. An unexpected response sets error.
// The 1 ms power-up wait, SPI mode, pin use, 512-byte blocks and the 2 GB
// limit follow the report; the command sequence is the SD card standard's.
`timescale 1ns/1ps
module n64_sd_spi #(
  parameter int unsigned POWERUP_CYC = 50000,
  parameter logic [7:0]  INIT_HALF   = 8'd63,
  parameter logic [7:0]  FAST_HALF   = 8'd0,
  parameter int unsigned R1_TRIES    = 16,
  parameter int unsigned TOKEN_TRIES = 65535
) (
  input  logic        clk,
  input  logic        rst,
  output logic        ready,
  output logic        error,
  input  logic        rd_req,
  input  logic [31:0] rd_addr,
  output logic        data_valid,
  output logic [7:0]  data_byte,
  output logic        rd_done,
  output logic        sd_sclk,
  output logic        sd_mosi,
  input  logic        sd_miso,
  output logic        sd_cs_n
);
  typedef enum logic [3:0] {S_PWR, S_DUMMY, S_CMD, S_R1, S_GAP, S_READY,
                            S_TOKEN, S_DATA, S_CRC, S_ERR} state_t;
  typedef enum logic [2:0] {P_CMD0, P_CMD55, P_ACMD41, P_CMD16, P_CMD17} phase_t;
  state_t state;
  phase_t phase;

  logic [31:0] cnt;
  logic [47:0] frame;
  logic        xf_start, xf_busy, xf_done, xf_pend, fast;
  logic [7:0]  xf_tx, xf_rx;

  n64_spi_byte u_byte (
    .clk, .rst, .half_div(fast ? FAST_HALF : INIT_HALF), .start(xf_start),
    .tx(xf_tx), .busy(xf_busy), .done(xf_done), .rx(xf_rx),
    .sclk(sd_sclk), .mosi(sd_mosi), .miso(sd_miso));

  function automatic logic [47:0] mk_cmd(input logic [5:0] idx, input logic [31:0] arg);
    logic [7:0] crc;
    crc = (idx == 6'd0) ? 8'h95 : 8'h01;   // only CMD0 is checked in SPI mode
    return {2'b01, idx, arg, crc};
  endfunction

  assign ready = (state == S_READY);
  assign error = (state == S_ERR);

  always_ff @(posedge clk) begin
    xf_start   <= 1'b0;
    data_valid <= 1'b0;
    rd_done    <= 1'b0;
    if (rst) begin
      state <= S_PWR; phase <= P_CMD0; cnt <= '0; frame <= '0; xf_pend <= 1'b0;
      xf_tx <= 8'hFF; fast <= 1'b0; sd_cs_n <= 1'b1; data_byte <= '0;
    end else begin
      unique case (state)
        S_PWR: begin
          if (cnt == POWERUP_CYC) begin cnt <= '0; state <= S_DUMMY; end
          else cnt <= cnt + 1;
        end
        S_DUMMY: begin   // 10 bytes of 0xFF with the card deselected
          if (!xf_pend) begin xf_start <= 1'b1; xf_tx <= 8'hFF; xf_pend <= 1'b1; end
          else if (xf_done) begin
            xf_pend <= 1'b0;
            if (cnt == 9) begin
              cnt <= '0; sd_cs_n <= 1'b0; phase <= P_CMD0;
              frame <= mk_cmd(6'd0, 32'd0); state <= S_CMD;
            end else cnt <= cnt + 1;
          end
        end
        S_CMD: begin     // six command bytes
          if (!xf_pend) begin
            xf_start <= 1'b1; xf_tx <= frame[47:40]; xf_pend <= 1'b1;
          end else if (xf_done) begin
            xf_pend <= 1'b0;
            frame <= {frame[39:0], 8'hFF};
            if (cnt == 5) begin cnt <= '0; state <= S_R1; end
            else cnt <= cnt + 1;
          end
        end
        S_R1: begin      // poll for the R1 response byte
          if (!xf_pend) begin xf_start <= 1'b1; xf_tx <= 8'hFF; xf_pend <= 1'b1; end
          else if (xf_done) begin
            xf_pend <= 1'b0;
            if (!xf_rx[7]) begin
              cnt <= '0;
              state <= S_GAP;
              unique case (phase)
                P_CMD0:   if (xf_rx == 8'h01) begin
                            phase <= P_CMD55; frame <= mk_cmd(6'd55, 32'd0);
                          end else state <= S_ERR;
                P_CMD55:  begin phase <= P_ACMD41; frame <= mk_cmd(6'd41, 32'd0); end
                P_ACMD41: if (xf_rx == 8'h00) begin
                            phase <= P_CMD16; frame <= mk_cmd(6'd16, 32'd512);
                          end else if (xf_rx == 8'h01) begin
                            phase <= P_CMD55; frame <= mk_cmd(6'd55, 32'd0);
                          end else state <= S_ERR;
                P_CMD16:  if (xf_rx != 8'h00) state <= S_ERR;
                P_CMD17:  if (xf_rx != 8'h00) state <= S_ERR;
                default:  state <= S_ERR;
              endcase
            end else if (cnt == R1_TRIES - 1) state <= S_ERR;
            else cnt <= cnt + 1;
          end
        end
        S_GAP: begin     // one idle byte between command and next step
          if (!xf_pend) begin xf_start <= 1'b1; xf_tx <= 8'hFF; xf_pend <= 1'b1; end
          else if (xf_done) begin
            xf_pend <= 1'b0;
            cnt <= '0;
            if (phase == P_CMD17)      state <= S_TOKEN;
            else if (phase == P_CMD16) begin state <= S_READY; fast <= 1'b1; end
            else                       state <= S_CMD;
          end
        end
        S_READY: if (rd_req) begin
          phase <= P_CMD17; frame <= mk_cmd(6'd17, {rd_addr[31:9], 9'd0});
          cnt <= '0; state <= S_CMD;
        end
        S_TOKEN: begin
          if (!xf_pend) begin xf_start <= 1'b1; xf_tx <= 8'hFF; xf_pend <= 1'b1; end
          else if (xf_done) begin
            xf_pend <= 1'b0;
            if (xf_rx == 8'hFE) begin cnt <= '0; state <= S_DATA; end
            else if (cnt == TOKEN_TRIES) state <= S_ERR;
            else cnt <= cnt + 1;
          end
        end
        S_DATA: begin
          if (!xf_pend) begin xf_start <= 1'b1; xf_tx <= 8'hFF; xf_pend <= 1'b1; end
          else if (xf_done) begin
            xf_pend <= 1'b0;
            data_valid <= 1'b1; data_byte <= xf_rx;
            if (cnt == 511) begin cnt <= '0; state <= S_CRC; end
            else cnt <= cnt + 1;
          end
        end
        S_CRC: begin
          if (!xf_pend) begin xf_start <= 1'b1; xf_tx <= 8'hFF; xf_pend <= 1'b1; end
          else if (xf_done) begin
            xf_pend <= 1'b0;
            if (cnt == 1) begin cnt <= '0; rd_done <= 1'b1; state <= S_READY; end
            else cnt <= cnt + 1;
          end
        end
        S_ERR: ;
        default: state <= S_ERR;
      endcase
    end
  end
endmodule
