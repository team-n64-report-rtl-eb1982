// n64_si: serial interface. Runs the controller commands that the CPU leaves
// in PIF RAM and writes the controller responses back.
//
// PIF RAM layout (32-bit words): word 2*c holds the command for controller c
// and word 2*c+1 receives its response (c = 0..3); word 9 (bytes 36..39)
// holds the CIC seed, written here after reset; word 15 (bytes 60..63) is the
// PIF status word whose bit 0 means "controller command pending". When start
// pulses (the memory controller sees bit 0 of the status word written as 1),
// the interface reads the command of each of NUM_CTRL controllers in turn.
// The three commands Identify (0x0000_0000), Poll (0x0000_0001) and Reset
// (0xFFFF_FFFF) are sent as their low byte; Poll expects a 32-bit response,
// Identify and Reset 24 bits. Any other word is skipped. Once all
// controllers are served, the status word is rewritten with bit 0 cleared and
// bit 8+c set for each controller that did not answer.
//
// Each controller has its own transceiver in the 4 MHz domain. A command is
// handed across by holding it in a register and toggling a request flag that
// the 4 MHz side synchronises; the response comes back the same way. A
// controller is not addressed again until POLL_GAP system cycles (0.375 ms at
// 50 MHz) have passed since its last transfer. PIF RAM layout, commands, flag
// crossing and gap follow the report; the response lengths of Identify and
// Reset, the no-answer flags and the CIC seed value are this design's
// choices.
`timescale 1ns/1ps
module n64_si
  import n64_pkg::*;
#(
  parameter int unsigned NUM_CTRL = 2,
  parameter int unsigned POLL_GAP = 18750,
  parameter logic [31:0] CIC_SEED = 32'h0000_3F3F,
  parameter int unsigned JB_US_CYC = 4
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                clk4,
  input  logic                rst4,
  input  logic                start,
  output logic                busy,
  // PIF RAM port B
  output logic [3:0]          ram_addr,
  output logic                ram_we,
  output logic [31:0]         ram_wdata,
  input  logic [31:0]         ram_rdata,
  // controller lines
  output logic [NUM_CTRL-1:0] jb_oe,
  input  logic [NUM_CTRL-1:0] jb_in,
  output logic [31:0]         n_transfers
);
  typedef enum logic [3:0] {S_INIT, S_IDLE, S_RD, S_RD_WAIT, S_DECODE, S_GAP,
                            S_WAIT_ACK, S_WR_RESP, S_NEXT, S_WR_STATUS} state_t;
  state_t state;

  localparam int CW = $clog2(NUM_CTRL + 1);
  logic [CW-1:0]   ch;
  logic [31:0]     cmd_word;
  logic [7:0]      x_cmd   [NUM_CTRL];   // held across the crossing
  logic [5:0]      x_bits  [NUM_CTRL];
  logic [NUM_CTRL-1:0] req_tgl, ack_s1, ack_s2, ack_seen;
  logic [NUM_CTRL-1:0] err;
  logic [31:0]     gap_cnt [NUM_CTRL];
  logic            pending;

  // 4 MHz side
  logic [NUM_CTRL-1:0] ack_tgl;
  logic [31:0]         jb_resp  [NUM_CTRL];
  logic [NUM_CTRL-1:0] jb_nores;

  for (genvar c = 0; c < NUM_CTRL; c++) begin : g_ch
    logic r1, r2, r3, jb_start, jb_done, jb_busy;
    always_ff @(posedge clk4) begin
      if (rst4) begin
        r1 <= 1'b0; r2 <= 1'b0; r3 <= 1'b0; ack_tgl[c] <= 1'b0;
      end else begin
        r1 <= req_tgl[c]; r2 <= r1; r3 <= r2;
        if (jb_done) ack_tgl[c] <= ~ack_tgl[c];
      end
    end
    assign jb_start = r2 ^ r3;
    n64_joybus #(.US_CYC(JB_US_CYC), .SAMPLE_AT(2*JB_US_CYC-1)) u_jb (
      .clk(clk4), .rst(rst4), .start(jb_start), .cmd(x_cmd[c]),
      .rx_bits(x_bits[c]), .busy(jb_busy), .done(jb_done),
      .resp(jb_resp[c]), .no_resp(jb_nores[c]),
      .line_oe(jb_oe[c]), .line_in(jb_in[c]));
  end

  assign busy = (state != S_IDLE);

  always_comb begin
    ram_addr  = '0;
    ram_we    = 1'b0;
    ram_wdata = '0;
    unique case (state)
      S_INIT:      begin ram_addr = 4'd9;  ram_we = 1'b1; ram_wdata = CIC_SEED; end
      S_RD, S_RD_WAIT: ram_addr = 4'(2*ch);
      S_WR_RESP:   begin ram_addr = 4'(2*ch + 1); ram_we = 1'b1;
                         ram_wdata = jb_resp[ch]; end
      S_WR_STATUS: begin ram_addr = 4'd15; ram_we = 1'b1;
                         ram_wdata = 32'(err) << 8; end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_INIT; ch <= '0; cmd_word <= '0; req_tgl <= '0;
      ack_s1 <= '0; ack_s2 <= '0; ack_seen <= '0; err <= '0; pending <= 1'b0;
      n_transfers <= '0;
      for (int c = 0; c < NUM_CTRL; c++) begin
        gap_cnt[c] <= 32'(POLL_GAP); x_cmd[c] <= '0; x_bits[c] <= '0;
      end
    end else begin
      ack_s1 <= ack_tgl;
      ack_s2 <= ack_s1;
      for (int c = 0; c < NUM_CTRL; c++)
        if (gap_cnt[c] < 32'(POLL_GAP)) gap_cnt[c] <= gap_cnt[c] + 1;
      if (start) pending <= 1'b1;
      unique case (state)
        S_INIT: state <= S_IDLE;
        S_IDLE: if (start || pending) begin
          pending <= 1'b0; ch <= '0; err <= '0; state <= S_RD;
        end
        S_RD:      state <= S_RD_WAIT;
        S_RD_WAIT: begin cmd_word <= ram_rdata; state <= S_DECODE; end
        S_DECODE: begin
          if (cmd_word == JB_CMD_IDENTIFY || cmd_word == JB_CMD_POLL ||
              cmd_word == JB_CMD_RESET) state <= S_GAP;
          else state <= S_NEXT;
        end
        S_GAP: if (gap_cnt[ch] >= 32'(POLL_GAP)) begin
          x_cmd[ch]  <= cmd_word[7:0];
          x_bits[ch] <= (cmd_word == JB_CMD_POLL) ? 6'd32 : 6'd24;
          req_tgl[ch] <= ~req_tgl[ch];
          state <= S_WAIT_ACK;
        end
        S_WAIT_ACK: if (ack_s2[ch] != ack_seen[ch]) begin
          ack_seen[ch] <= ack_s2[ch];
          err[ch] <= jb_nores[ch];
          state <= S_WR_RESP;
        end
        S_WR_RESP: begin
          gap_cnt[ch] <= '0;
          n_transfers <= n_transfers + 1;
          state <= S_NEXT;
        end
        S_NEXT: begin
          if (32'(ch) == NUM_CTRL - 1) state <= S_WR_STATUS;
          else begin ch <= ch + 1'b1; state <= S_RD; end
        end
        S_WR_STATUS: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
