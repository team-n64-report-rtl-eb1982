// n64_dma: DMA engine of the memory controller. Copies len bytes from src to
// dst through the memory controller's own routing, so any two memory
// segments can be connected (cartridge to RDRAM, RDRAM to PIF RAM and back).
//
// The transfer is cut into 32-byte chunks: up to four 64-bit reads from the
// source into a chunk buffer, then up to four 64-bit writes to the
// destination, after which both addresses advance by 32. Lengths are rounded
// up to whole doublewords; the destination must be doubleword aligned, the
// source may be unaligned if its segment supports it (the cartridge does).
// start is taken when idle; done pulses when the last write is acknowledged.
// The master port follows the system bus handshake (hold req until ack).
// The 32-byte chunking with incrementing addresses follows the report; the
// read-all-then-write-all order within a chunk is this design's choice.
`timescale 1ns/1ps
module n64_dma
  import n64_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [31:0] src,
  input  logic [31:0] dst,
  input  logic [31:0] len,
  output logic        busy,
  output logic        done,
  output mem_req_t    m_req,
  input  mem_rsp_t    m_rsp,
  output logic [31:0] n_chunks
);
  typedef enum logic [1:0] {S_IDLE, S_RD, S_WR} state_t;
  state_t state;

  logic [31:0] s_addr, d_addr, remain;   // remain in doublewords
  logic [63:0] buf_q [4];
  logic [1:0]  beat;
  logic [2:0]  nbeats;

  assign busy = (state != S_IDLE);
  wire [2:0] chunk_beats = (remain >= 4) ? 3'd4 : remain[2:0];

  always_comb begin
    m_req       = '0;
    m_req.req   = (state == S_RD) || (state == S_WR);
    m_req.we    = (state == S_WR);
    m_req.addr  = (state == S_WR) ? d_addr + {27'd0, beat, 3'd0}
                                  : s_addr + {27'd0, beat, 3'd0};
    m_req.wdata = buf_q[beat];
    m_req.be    = 8'hFF;
  end

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst) begin
      state <= S_IDLE; s_addr <= '0; d_addr <= '0; remain <= '0; beat <= '0;
      nbeats <= '0; n_chunks <= '0;
      for (int i = 0; i < 4; i++) buf_q[i] <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          s_addr <= src;
          d_addr <= {dst[31:3], 3'd0};
          remain <= (len + 32'd7) >> 3;
          beat   <= '0;
          state  <= ((len + 32'd7) >> 3) == 0 ? S_IDLE : S_RD;
          done   <= ((len + 32'd7) >> 3) == 0;
        end
        S_RD: if (m_rsp.ack) begin
          buf_q[beat] <= m_rsp.rdata;
          if (3'(beat) + 3'd1 == chunk_beats) begin
            beat <= '0; nbeats <= chunk_beats; state <= S_WR;
          end else beat <= beat + 2'd1;
        end
        S_WR: if (m_rsp.ack) begin
          if (3'(beat) + 3'd1 == nbeats) begin
            beat     <= '0;
            s_addr   <= s_addr + 32'd32;
            d_addr   <= d_addr + 32'd32;
            remain   <= remain - 32'(nbeats);
            n_chunks <= n_chunks + 1;
            if (remain == 32'(nbeats)) begin state <= S_IDLE; done <= 1'b1; end
            else state <= S_RD;
          end else beat <= beat + 2'd1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
