// n64_icache: direct-mapped, read-only instruction cache with 32-byte lines.
//
// The CPU side and the memory side are both system-bus ports. A request
// marked uncached (kseg1) passes straight through. A cached request reads
// tag and data synchronously and answers in the next cycle on a hit. On a
// miss the line is fetched as four 64-bit reads, each written into the line
// as it arrives; the tag is then set valid and the requested doubleword
// returned. inv (from the CACHE instruction) clears the valid bit of the
// line that holds inv_addr. The cache cannot be written by the CPU.
// Direct mapping, read-only use and the 32-byte line follow the report; the
// 16 KB size is the VR4300's, which the report does not state.
`timescale 1ns/1ps
module n64_icache
  import n64_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 16384,
  parameter int unsigned LINE_BYTES = 32,
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
  output logic [31:0] n_misses
);
  typedef enum logic [2:0] {S_IDLE, S_LOOK, S_FILL, S_DONE, S_BYP} state_t;
  state_t state;

  logic [TAGW-1:0] tag_mem [LINES];
  logic [LINES-1:0] valid;
  logic [63:0]     data_mem [LINES*BEATS];
  logic [TAGW-1:0] tag_q;
  logic [63:0]     data_q, hold;
  logic [BW-1:0]   beat;

  wire [IDXW-1:0] idx  = c_req.addr[OFSW +: IDXW];
  wire [TAGW-1:0] tag  = c_req.addr[OFSW+IDXW +: TAGW];
  wire [BW-1:0]   cbt  = c_req.addr[3 +: BW];
  wire            hit  = valid[idx] && tag_q == tag;

  always_ff @(posedge clk) begin
    tag_q  <= tag_mem[idx];
    data_q <= data_mem[{idx, cbt}];
    if (state == S_FILL && m_rsp.ack) data_mem[{idx, beat}] <= m_rsp.rdata;
    if (state == S_FILL && m_rsp.ack && beat == BW'(BEATS - 1)) tag_mem[idx] <= tag;
  end

  always_comb begin
    c_rsp = '0;
    m_req = '0;
    unique case (state)
      S_LOOK: begin c_rsp.ack = hit; c_rsp.rdata = data_q; end
      S_DONE: begin c_rsp.ack = 1'b1; c_rsp.rdata = hold; end
      S_BYP:  begin m_req = c_req; c_rsp = m_rsp; end
      S_FILL: begin
        m_req.req  = 1'b1;
        m_req.addr = {c_req.addr[31:OFSW], beat, 3'b000};
        m_req.be   = 8'hFF;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE; valid <= '0; beat <= '0; hold <= '0;
      n_hits <= '0; n_misses <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (c_req.req) state <= c_cached ? S_LOOK : S_BYP;
        S_LOOK: if (hit) begin
          n_hits <= n_hits + 1; state <= S_IDLE;
        end else begin
          n_misses <= n_misses + 1; beat <= '0; state <= S_FILL;
        end
        S_FILL: if (m_rsp.ack) begin
          if (beat == cbt) hold <= m_rsp.rdata;
          if (beat == BW'(BEATS - 1)) begin
            valid[idx] <= 1'b1; state <= S_DONE;
          end else beat <= beat + 1'b1;
        end
        S_DONE: state <= S_IDLE;
        S_BYP:  if (m_rsp.ack) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
      if (inv) valid[inv_addr[OFSW +: IDXW]] <= 1'b0;
    end
  end
endmodule
