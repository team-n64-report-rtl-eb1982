// n64_cpu_memif: the CPU's memory interface. Merges the instruction side
// and the data side (each already behind its cache) onto the single system
// bus to the memory controller.
//
// When the bus is free and both sides ask, the data side wins, so that the
// later pipeline stage, which holds up everything behind it, drains first.
// A grant is kept until the memory controller acknowledges the access; the
// acknowledge goes back only to the side that was granted. The report says
// this module must prioritise its requesters for the best pipeline
// throughput without giving the order; data-first is this design's choice.
`timescale 1ns/1ps
module n64_cpu_memif
  import n64_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  mem_req_t i_req,
  output mem_rsp_t i_rsp,
  input  mem_req_t d_req,
  output mem_rsp_t d_rsp,
  output mem_req_t m_req,
  input  mem_rsp_t m_rsp
);
  typedef enum logic [1:0] {G_NONE, G_I, G_D} grant_t;
  grant_t g, g_q;

  always_comb begin
    g = g_q;
    if (g_q == G_NONE) g = d_req.req ? G_D : (i_req.req ? G_I : G_NONE);
  end

  always_comb begin
    m_req = (g == G_D) ? d_req : (g == G_I) ? i_req : '0;
    i_rsp.rdata = m_rsp.rdata;
    d_rsp.rdata = m_rsp.rdata;
    i_rsp.ack = (g == G_I) && m_rsp.ack;
    d_rsp.ack = (g == G_D) && m_rsp.ack;
  end

  always_ff @(posedge clk) begin
    if (rst) g_q <= G_NONE;
    else g_q <= m_rsp.ack ? G_NONE : g;
  end
endmodule
