// n64_tb_mem: behavioural system-bus memory for testbenches. Answers each
// request after a random 1..MAX_LAT cycle delay; stores doublewords sparsely;
// unwritten memory reads as zero. poke/peek give the testbench direct access.
`timescale 1ns/1ps
module n64_tb_mem
  import n64_pkg::*;
#(parameter int MAX_LAT = 4) (
  input  logic     clk,
  input  mem_req_t req,
  output mem_rsp_t rsp
);
  logic [63:0] mem [logic [28:0]];
  int n_acc = 0;

  function automatic void poke(input logic [31:0] a, input logic [63:0] d);
    mem[a[31:3]] = d;
  endfunction
  function automatic logic [63:0] peek(input logic [31:0] a);
    return mem.exists(a[31:3]) ? mem[a[31:3]] : 64'h0;
  endfunction

  int  wait_cyc = 0;
  bit  pending = 0;
  initial rsp = '0;

  task automatic serve();
    logic [63:0] d;
    d = peek(req.addr);
    if (req.we) begin
      for (int k = 0; k < 8; k++) if (req.be[7-k]) d[63-8*k -: 8] = req.wdata[63-8*k -: 8];
      mem[req.addr[31:3]] = d;
    end
    n_acc++;
    rsp <= '{ack: 1'b1, rdata: d};
  endtask

  always @(posedge clk) begin
    rsp <= '0;
    if (!pending && req.req && !rsp.ack) begin
      pending  = 1;
      wait_cyc = $urandom_range(MAX_LAT - 1, 0);
    end
    if (pending) begin
      if (wait_cyc == 0) begin serve(); pending = 0; end
      else wait_cyc--;
    end
  end
endmodule
