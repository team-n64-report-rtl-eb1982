// n64_pi: peripheral interface, the cartridge side of the memory system.
//
// The cartridge ROM is read from an SD card (raw image written from card
// address 0). Because the card delivers whole 512-byte blocks, the interface
// keeps one 512-byte sector cache. A read asks for the eight bytes starting
// at any byte offset of the cartridge and returns them big-endian on a
// 64-bit bus. When every byte is in the cached sector the answer comes in the
// same cycle as the request (ack is combinational). Otherwise the bytes that
// hit are kept, the cache is invalidated and refilled with the sector of the
// first missing byte, and the lookup repeats; a read that straddles two
// sectors therefore costs two fills. waiting is high until the card has been
// initialised; requests are not accepted before that. Writes to the
// cartridge are not supported, as in the report. Single-sector cache,
// invalidation on a miss and the straddling rule follow the report.
`timescale 1ns/1ps
module n64_pi (
  input  logic        clk,
  input  logic        rst,
  input  logic        req,
  input  logic [31:0] addr,       // byte offset in the cartridge
  output logic        ack,
  output logic [63:0] rdata,
  output logic        waiting,
  // SD card controller
  input  logic        sd_ready,
  output logic        sd_rd_req,
  output logic [31:0] sd_rd_addr,
  input  logic        sd_data_valid,
  input  logic [7:0]  sd_data_byte,
  input  logic        sd_rd_done,
  output logic [31:0] n_fills,
  output logic [31:0] n_splits
);
  typedef enum logic [1:0] {S_IDLE, S_LOOK, S_FILL} state_t;
  state_t state;

  logic [7:0]  cbuf [512];
  logic [22:0] tag;
  logic        valid;
  logic [31:0] h_addr;
  logic [7:0]  h_mask;          // bytes already captured (bit 7 = byte 0)
  logic [63:0] h_data;
  logic [8:0]  fcnt;

  wire         look   = (state == S_IDLE && req && sd_ready) || state == S_LOOK;
  wire  [31:0] c_addr = (state == S_IDLE) ? addr : h_addr;
  wire  [7:0]  c_mask = (state == S_IDLE) ? 8'h00 : h_mask;

  logic [7:0]  hit, all_mask;
  logic [63:0] merged;
  logic [2:0]  first_miss;
  logic [31:0] miss_addr;

  always_comb begin
    merged = (state == S_IDLE) ? 64'h0 : h_data;
    first_miss = 3'd0;
    miss_addr = c_addr;
    for (int i = 7; i >= 0; i--) begin
      logic [31:0] a;
      a = c_addr + 32'(7 - i);
      hit[i] = valid && (a[31:9] == tag) && !c_mask[i];
      if (hit[i]) merged[8*i +: 8] = cbuf[a[8:0]];
    end
    all_mask = c_mask | hit;
    for (int i = 0; i <= 7; i++)
      if (!all_mask[i]) begin first_miss = 3'(7 - i); end
    miss_addr = c_addr + 32'(first_miss);
  end

  assign ack     = look && (all_mask == 8'hFF);
  assign rdata   = merged;
  assign waiting = !sd_ready;

  always_ff @(posedge clk) begin
    sd_rd_req <= 1'b0;
    if (rst) begin
      state <= S_IDLE; valid <= 1'b0; tag <= '0; h_addr <= '0; h_mask <= '0;
      h_data <= '0; fcnt <= '0; sd_rd_addr <= '0;
      n_fills <= '0; n_splits <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_LOOK: if (look && !ack) begin
          h_addr <= c_addr;
          h_mask <= all_mask;
          h_data <= merged;
          if (all_mask != 8'h00) n_splits <= n_splits + 1;
          valid  <= 1'b0;               // the sector cache is cleared on a miss
          sd_rd_addr <= {miss_addr[31:9], 9'd0};
          tag    <= miss_addr[31:9];
          sd_rd_req <= 1'b1;
          fcnt   <= '0;
          n_fills <= n_fills + 1;
          state  <= S_FILL;
        end else if (ack) state <= S_IDLE;
        S_FILL: begin
          if (sd_data_valid) begin
            cbuf[fcnt] <= sd_data_byte;
            fcnt <= fcnt + 9'd1;
          end
          if (sd_rd_done) begin valid <= 1'b1; state <= S_LOOK; end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
