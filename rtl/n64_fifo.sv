// n64_fifo: synchronous first-in first-out buffer with show-ahead output.
//
// rdata always shows the oldest entry while empty is low; pop removes it at
// the clock edge. A push when full and a pop when empty are ignored. level
// counts the stored entries. Used to hold PCM samples for the audio output,
// as the report describes; depth and width are parameters.
`timescale 1ns/1ps
module n64_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic             full,
  output logic [AW:0]      level
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;

  assign empty = (level == 0);
  assign full  = (32'(level) == DEPTH);
  assign rdata = mem[rp];

  wire do_push = push && !full;
  wire do_pop  = pop && !empty;

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0; rp <= '0; level <= '0;
    end else begin
      if (do_push) begin
        mem[wp] <= wdata;
        wp <= (32'(wp) == DEPTH - 1) ? '0 : wp + 1'b1;
      end
      if (do_pop) rp <= (32'(rp) == DEPTH - 1) ? '0 : rp + 1'b1;
      level <= level + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end
endmodule
