// n64_cellram_ctrl: controller for the board's 16 MB Micron cellular RAM
// (a pseudo-SRAM with a 16-bit data bus), used as the N64's main memory.
//
// The RAM is driven in its asynchronous mode, in which it behaves like an
// SRAM with a 70 ns read and write cycle; the asynchronous timings are turned
// into clock counts. A 64-bit bus access becomes four 16-bit RAM cycles,
// halfword 0 (bits 63:48) first; the even (lower-address) byte of a halfword
// is on dq[15:8] and is masked with ub_n, the odd byte with lb_n. Each RAM
// cycle holds address, chip enable and oe_n or we_n for ACCESS_CYC clocks
// (4 x 20 ns = 80 ns at 50 MHz), reads the data in the last of them, then
// deasserts everything for one recovery clock. ack pulses when all four
// halfwords are done; a read or a write thus takes 4*(ACCESS_CYC+1) cycles.
// ram_clk is held low and adv_n low, as asynchronous mode requires (the RAM
// misbehaves if clocked while configured as asynchronous); cre stays low, so
// the configuration registers are never written. The report also ran the
// RAM in synchronous burst mode; that mode is not implemented here.
`timescale 1ns/1ps
module n64_cellram_ctrl #(
  parameter int unsigned ACCESS_CYC = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        req,
  input  logic        we,
  input  logic [23:0] addr,     // byte address, doubleword aligned
  input  logic [63:0] wdata,
  input  logic [7:0]  be,
  output logic        ack,
  output logic [63:0] rdata,
  // RAM pins
  output logic [22:0] ram_a,    // halfword address
  output logic [15:0] ram_dq_o,
  output logic        ram_dq_oe,
  input  logic [15:0] ram_dq_i,
  output logic        ram_ce_n,
  output logic        ram_oe_n,
  output logic        ram_we_n,
  output logic        ram_ub_n,
  output logic        ram_lb_n,
  output logic        ram_adv_n,
  output logic        ram_cre,
  output logic        ram_clk
);
  typedef enum logic [1:0] {S_IDLE, S_ACC, S_REC} state_t;
  state_t state;
  logic [1:0] hw;
  logic [7:0] cnt;

  assign ram_clk   = 1'b0;
  assign ram_cre   = 1'b0;
  assign ram_adv_n = 1'b0;

  wire [1:0] be_hw = be[7 - 2*hw -: 2];

  always_comb begin
    ram_a     = {addr[23:3], hw};
    ram_dq_o  = wdata[63 - 16*hw -: 16];
    ram_ce_n  = (state != S_ACC);
    ram_oe_n  = !(state == S_ACC && !we);
    ram_we_n  = !(state == S_ACC && we);
    ram_dq_oe = (state == S_ACC && we);
    ram_ub_n  = (state == S_ACC && we) ? !be_hw[1] : 1'b0;
    ram_lb_n  = (state == S_ACC && we) ? !be_hw[0] : 1'b0;
  end

  always_ff @(posedge clk) begin
    ack <= 1'b0;
    if (rst) begin
      state <= S_IDLE; hw <= '0; cnt <= '0; rdata <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (req && !ack) begin hw <= '0; cnt <= '0; state <= S_ACC; end
        S_ACC: begin
          if (32'(cnt) == ACCESS_CYC - 1) begin
            if (!we) rdata[63 - 16*hw -: 16] <= ram_dq_i;
            cnt <= '0;
            state <= S_REC;
          end else cnt <= cnt + 8'd1;
        end
        S_REC: begin
          if (hw == 2'd3) begin ack <= 1'b1; state <= S_IDLE; end
          else begin hw <= hw + 2'd1; state <= S_ACC; end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
