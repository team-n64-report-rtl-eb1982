// n64_joybus: single-wire controller transceiver, running in the 4 MHz
// controller clock domain.
//
// The N64 controller shares one open-drain data line with the console. Every
// bit lasts 4 us and is sent as four 1 us slots: a 0 bit is low,low,low,high;
// a 1 bit is low,high,high,high; a stop bit is low,high,high (3 us). With a
// 4 MHz clock one slot is US_CYC = 4 cycles. On start the module sends the
// 8-bit command byte MSB first and a stop bit, releases the line and receives
// rx_bits response bits: after each falling edge it samples the line
// SAMPLE_AT = 7 cycles later, which lands in the middle slots that carry the
// bit value. If no falling edge arrives within TIMEOUT_CYC cycles the
// transfer ends with no_resp set. done pulses for one cycle at the end; resp
// holds the response, right-aligned, until the next start.
// line_oe = 1 pulls the line low; otherwise the pull-up holds it high.
// Bit timing, sample point and 4 MHz clock follow the report; the timeout
// and the synchroniser on line_in are this design's choices.
`timescale 1ns/1ps
module n64_joybus #(
  parameter int unsigned US_CYC      = 4,
  parameter int unsigned SAMPLE_AT   = 7,
  parameter int unsigned TIMEOUT_CYC = 64
) (
  input  logic        clk,      // 4 MHz
  input  logic        rst,
  input  logic        start,
  input  logic [7:0]  cmd,
  input  logic [5:0]  rx_bits,
  output logic        busy,
  output logic        done,
  output logic [31:0] resp,
  output logic        no_resp,
  output logic        line_oe,
  input  logic        line_in
);
  typedef enum logic [2:0] {S_IDLE, S_TX, S_STOP, S_RX_WAIT, S_RX_BIT, S_RX_HIGH} state_t;
  state_t state;

  logic [7:0]  cnt;
  logic [3:0]  bitn;
  logic [7:0]  sh;
  logic [5:0]  nrx;
  logic        l_s1, l_s2, l_prev;

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      l_s1 <= 1'b1; l_s2 <= 1'b1; l_prev <= 1'b1;
    end else begin
      l_s1 <= line_in; l_s2 <= l_s1; l_prev <= l_s2;
    end
  end
  wire fall = l_prev && !l_s2;

  // slot index of the current 1 us slot within a bit
  wire [7:0] slot = cnt / 8'(US_CYC);

  always_comb begin
    line_oe = 1'b0;
    unique case (state)
      S_TX:   line_oe = (slot == 0) || (slot < 3 && !sh[7]);
      S_STOP: line_oe = (slot == 0);
      default: line_oe = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst) begin
      state <= S_IDLE; cnt <= '0; bitn <= '0; sh <= '0; nrx <= '0;
      resp <= '0; no_resp <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          sh <= cmd; bitn <= 4'd0; cnt <= '0; state <= S_TX;
          resp <= '0; no_resp <= 1'b0; nrx <= '0;
        end
        S_TX: begin
          if (cnt == 8'(4*US_CYC - 1)) begin
            cnt <= '0;
            sh  <= {sh[6:0], 1'b0};
            if (bitn == 4'd7) state <= S_STOP;
            bitn <= bitn + 4'd1;
          end else cnt <= cnt + 8'd1;
        end
        S_STOP: begin
          if (cnt == 8'(3*US_CYC - 1)) begin
            cnt <= '0; state <= S_RX_WAIT;
          end else cnt <= cnt + 8'd1;
        end
        S_RX_WAIT: begin
          if (nrx == rx_bits) begin
            state <= S_IDLE; done <= 1'b1;
          end else if (fall) begin
            cnt <= '0; state <= S_RX_BIT;
          end else if (cnt == 8'(TIMEOUT_CYC)) begin
            no_resp <= 1'b1; state <= S_IDLE; done <= 1'b1;
          end else cnt <= cnt + 8'd1;
        end
        S_RX_BIT: begin
          if (cnt == 8'(SAMPLE_AT)) begin
            resp <= {resp[30:0], l_s2};
            nrx  <= nrx + 6'd1;
            state <= S_RX_HIGH;
          end
          cnt <= cnt + 8'd1;
        end
        S_RX_HIGH: begin
          // wait for the line to return high before looking for the next bit
          if (l_s2) begin cnt <= '0; state <= S_RX_WAIT; end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
