// n64_dcache: direct-mapped write-back data cache with 16-byte lines.
//
// Ports as in the instruction cache. Uncached requests pass through. A
// cached access reads tag and data synchronously and completes in the next
// cycle on a hit; a store hit merges its enabled bytes into the line and
// marks it dirty. On a miss a dirty victim is copied into the write-back
// buffer (two cycles per beat, no bus traffic), then the line is filled by
// two 64-bit reads and the access is looked up again. The buffer drains to
// memory afterwards, in the background, while hits go on; a miss, an
// uncached access or a CACHE operation waits until it is empty, so the bus
// request of a drain is never cut off and memory is never read stale. inv (from the CACHE instruction) writes the line that
// holds inv_addr back if it is dirty and invalidates it; if the line at that
// index holds another address it is left alone. Direct mapping,
// writability and the 16-byte line follow the report; the 8 KB size is the
// VR4300's, which the report does not state. The write-back buffer follows
// the report, which gives it up to 32 bytes; here it holds one 16-byte
// victim line, which is all one miss can evict. A CACHE write-back goes
// straight to memory, not through the buffer.
`timescale 1ns/1ps
module n64_dcache
  import n64_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 8192,
  parameter int unsigned LINE_BYTES = 16,
  localparam int unsigned LINES = SIZE_BYTES / LINE_BYTES,
  localparam int unsigned BEATS = LINE_BYTES / 8,
  localparam int unsigned OFSW  = $clog2(LINE_BYTES),
  localparam int unsigned IDXW  = $clog2(LINES),
  localparam int unsigned BW    = $clog2(BEATS),
  localparam int unsigned TAGW  = 29 - OFSW - IDXW
) (
  input  logic     clk,
  input  logic     rst,
  input  mem_req_t c_req,
  input  logic     c_cached,
  output mem_rsp_t c_rsp,
  output mem_req_t m_req,
  input  mem_rsp_t m_rsp,
  input  logic     inv,
  input  logic [31:0] inv_addr,
  output logic [31:0] n_hits,
  output logic [31:0] n_misses,
  output logic [31:0] n_writebacks
);
  typedef enum logic [3:0] {S_IDLE, S_LOOK, S_WB_RD, S_WB_CAP, S_WB_WR, S_FILL, S_RELOOK,
                            S_BYP, S_OP_RD, S_OP_CHK} state_t;
  state_t state;

  logic [TAGW-1:0]  tag_mem [LINES];
  logic [LINES-1:0] valid, dirty;
  logic [63:0]      data_mem [LINES*BEATS];
  logic [TAGW-1:0]  tag_q;
  logic [63:0]      data_q;
  logic [BW-1:0]    beat;
  logic             op_pend, op_mode;
  logic [31:0]      op_addr;
  // write-back buffer: one victim line
  logic             wbuf_valid;
  logic [28-OFSW:0] wbuf_line;
  logic [63:0]      wbuf_data [BEATS];
  logic [BW-1:0]    wbuf_beat;
  // the buffer may use the bus in every state that does not
  wire drain = wbuf_valid && !(state == S_FILL || state == S_BYP || state == S_WB_WR);

  // the address being worked on: the pending CACHE operation or the request
  wire [31:0]     w_addr = (op_mode || state == S_OP_RD) ? op_addr : c_req.addr;
  wire [IDXW-1:0] idx  = w_addr[OFSW +: IDXW];
  wire [TAGW-1:0] tag  = w_addr[OFSW+IDXW +: TAGW];
  wire [BW-1:0]   cbt  = c_req.addr[3 +: BW];
  wire            hit  = valid[idx] && tag_q == tag;
  wire [BW-1:0]   rbt  = (state == S_WB_RD || state == S_WB_WR || state == S_OP_CHK || state == S_OP_RD ||
                          (state == S_LOOK && !hit)) ? beat : cbt;

  always_ff @(posedge clk) begin
    tag_q  <= tag_mem[idx];
    data_q <= data_mem[{idx, rbt}];
    if (state == S_LOOK && hit && c_req.we)
      for (int k = 0; k < 8; k++)
        if (c_req.be[7-k]) data_mem[{idx, cbt}][63-8*k -: 8] <= c_req.wdata[63-8*k -: 8];
    if (state == S_FILL && m_rsp.ack) data_mem[{idx, beat}] <= m_rsp.rdata;
    if (state == S_FILL && m_rsp.ack && beat == BW'(BEATS - 1)) tag_mem[idx] <= tag;
    if (state == S_WB_CAP) wbuf_data[beat] <= data_q;
  end

  always_comb begin
    c_rsp = '0;
    m_req = '0;
    unique case (state)
      S_LOOK: begin c_rsp.ack = hit; c_rsp.rdata = data_q; end
      S_BYP:  begin m_req = c_req; c_rsp = m_rsp; end
      S_WB_WR: begin
        m_req.req = 1'b1; m_req.we = 1'b1; m_req.be = 8'hFF; m_req.wdata = data_q;
        m_req.addr = {3'b000, tag_q, idx, beat, 3'b000};
      end
      S_FILL: begin
        m_req.req = 1'b1; m_req.be = 8'hFF;
        m_req.addr = {w_addr[31:OFSW], beat, 3'b000};
      end
      default: ;
    endcase
    if (drain) begin
      m_req.req = 1'b1; m_req.we = 1'b1; m_req.be = 8'hFF;
      m_req.wdata = wbuf_data[wbuf_beat];
      m_req.addr = {3'b000, wbuf_line, wbuf_beat, 3'b000};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE; valid <= '0; dirty <= '0; beat <= '0;
      op_pend <= 1'b0; op_mode <= 1'b0; op_addr <= '0;
      wbuf_valid <= 1'b0; wbuf_line <= '0; wbuf_beat <= '0;
      n_hits <= '0; n_misses <= '0; n_writebacks <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (op_pend && !wbuf_valid) begin
            op_pend <= 1'b0; op_mode <= 1'b1; beat <= '0; state <= S_OP_RD;
          end else if (!op_pend && c_req.req && (c_cached || !wbuf_valid))
            state <= c_cached ? S_LOOK : S_BYP;
        end
        S_OP_RD: state <= S_OP_CHK;
        S_OP_CHK: begin
          if (hit && dirty[idx]) state <= S_WB_WR;   // data_q holds beat 0
          else begin
            if (hit) valid[idx] <= 1'b0;             // another line's data stays
            op_mode <= 1'b0; state <= S_IDLE;
          end
        end
        S_LOOK: begin
          if (hit) begin
            n_hits <= n_hits + 1;
            if (c_req.we) dirty[idx] <= 1'b1;
            state <= S_IDLE;
          end else if (!wbuf_valid) begin           // else wait for the drain
            n_misses <= n_misses + 1;
            beat <= '0;
            state <= (valid[idx] && dirty[idx]) ? S_WB_RD : S_FILL;
          end
        end
        S_WB_RD: state <= op_mode ? S_WB_WR : S_WB_CAP;
        S_WB_CAP: begin                             // data_q holds victim beat
          wbuf_line <= {tag_q, idx};
          if (beat == BW'(BEATS - 1)) begin
            wbuf_valid <= 1'b1; wbuf_beat <= '0; dirty[idx] <= 1'b0;
            beat <= '0; state <= S_FILL;
          end else begin beat <= beat + 1'b1; state <= S_WB_RD; end
        end
        S_WB_WR: if (m_rsp.ack) begin
          if (beat == BW'(BEATS - 1)) begin
            n_writebacks <= n_writebacks + 1;
            dirty[idx] <= 1'b0;
            beat <= '0;
            valid[idx] <= 1'b0; op_mode <= 1'b0; state <= S_IDLE;
          end else begin beat <= beat + 1'b1; state <= S_WB_RD; end
        end
        S_FILL: if (m_rsp.ack) begin
          if (beat == BW'(BEATS - 1)) begin
            valid[idx] <= 1'b1; dirty[idx] <= 1'b0; state <= S_RELOOK;
          end else beat <= beat + 1'b1;
        end
        S_RELOOK: state <= S_LOOK;
        S_BYP:  if (m_rsp.ack) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
      if (drain && m_rsp.ack) begin
        wbuf_beat <= wbuf_beat + 1'b1;
        if (wbuf_beat == BW'(BEATS - 1)) begin
          wbuf_valid <= 1'b0; n_writebacks <= n_writebacks + 1;
        end
      end
      // after the case, so that a new operation is not lost when the
      // previous one is taken up in the same cycle
      if (inv) begin op_pend <= 1'b1; op_addr <= inv_addr; end
    end
  end
endmodule
