// n64_pifrom: the PIF boot ROM, 0x7C0 bytes (248 doublewords) of block RAM
// mapped at 0x1FC0_0000..0x1FC0_07BF.
//
// The read port is synchronous (data one cycle after the address), 64 bits
// wide, big-endian. The boot image itself is not part of this design: on the
// FPGA it is preloaded with the bitstream; here a load port (ld_we/ld_addr/
// ld_data) fills the ROM after reset, before the CPU is released, and
// INIT_FILE may name a hex image of 64-bit words instead.
`timescale 1ns/1ps
module n64_pifrom #(
  parameter int unsigned BYTES     = 1984,
  parameter string       INIT_FILE = "",
  localparam int unsigned WORDS = BYTES / 8,
  localparam int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [63:0]   rdata,
  input  logic          ld_we,
  input  logic [AW-1:0] ld_addr,
  input  logic [63:0]   ld_data
);
  logic [63:0] mem [WORDS];

  initial if (INIT_FILE != "") $readmemh(INIT_FILE, mem);

  always_ff @(posedge clk) begin
    if (ld_we) mem[ld_addr] <= ld_data;
    rdata <= (32'(addr) < WORDS) ? mem[addr] : 64'h0;
  end
endmodule
