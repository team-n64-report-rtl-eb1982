// n64_pifram: the 64-byte PIF RAM, a true dual-port RAM shared by the CPU
// (through the memory controller) and the serial interface.
//
// Port A is the 64-bit system-bus side: eight doublewords, byte enables,
// big-endian. Port B is the 32-bit serial-interface side: sixteen words,
// word 0 = bytes 0..3. Both ports read synchronously (data one cycle after
// the address). If both ports write the same bytes in one cycle, port B (the
// serial interface) wins; the report only says the RAM is dual-ported, so that
// rule is this design's choice.
`timescale 1ns/1ps
module n64_pifram (
  input  logic        clk,
  // port A: system bus
  input  logic [2:0]  a_addr,   // doubleword index
  input  logic        a_we,
  input  logic [7:0]  a_be,
  input  logic [63:0] a_wdata,
  output logic [63:0] a_rdata,
  // port B: serial interface
  input  logic [3:0]  b_addr,   // word index
  input  logic        b_we,
  input  logic [31:0] b_wdata,
  output logic [31:0] b_rdata
);
  logic [63:0] mem [8];

  always_ff @(posedge clk) begin
    for (int k = 0; k < 8; k++)
      if (a_we && a_be[7-k]) mem[a_addr][63-8*k -: 8] <= a_wdata[63-8*k -: 8];
    if (b_we) begin
      if (b_addr[0]) mem[b_addr[3:1]][31:0]  <= b_wdata;
      else           mem[b_addr[3:1]][63:32] <= b_wdata;
    end
    a_rdata <= mem[a_addr];
    b_rdata <= b_addr[0] ? mem[b_addr[3:1]][31:0] : mem[b_addr[3:1]][63:32];
  end
endmodule
