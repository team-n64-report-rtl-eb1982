// n64_pkg: types and constants shared by the N64 system.
//
// The system bus is a 64-bit, big-endian request/acknowledge bus. A master
// raises req with addr/we/wdata/be and holds them until ack is high for one
// cycle; rdata is valid in that cycle. Byte offset k of a doubleword lives in
// bits [63-8k -: 8] and is enabled by be[7-k], matching the big-endian byte
// order of the VR4300. The physical address map follows the N64 memory map;
// register offsets inside a region that the map does not list are the
// conventional N64 ones and are this design's choice.
`timescale 1ns/1ps
package n64_pkg;

  typedef struct packed {
    logic        req;
    logic        we;
    logic [31:0] addr;   // physical byte address
    logic [63:0] wdata;
    logic [7:0]  be;     // be[7] = byte at offset 0 (bits 63:56)
  } mem_req_t;

  typedef struct packed {
    logic        ack;
    logic [63:0] rdata;
  } mem_rsp_t;

  // ---- physical memory map --------------------------------------------
  localparam logic [31:0] RDRAM_END     = 32'h03EF_FFFF;
  localparam logic [31:0] RDRAM_REG_LO  = 32'h03F0_0000;
  localparam logic [31:0] SP_LO         = 32'h0400_0000;  // SP DMEM/IMEM + regs
  localparam logic [31:0] DPC_LO        = 32'h0410_0000;
  localparam logic [31:0] DPS_LO        = 32'h0420_0000;
  localparam logic [31:0] MI_LO         = 32'h0430_0000;
  localparam logic [31:0] VI_LO         = 32'h0440_0000;
  localparam logic [31:0] AI_LO         = 32'h0450_0000;
  localparam logic [31:0] PI_LO         = 32'h0460_0000;
  localparam logic [31:0] RI_LO         = 32'h0470_0000;
  localparam logic [31:0] SI_LO         = 32'h0480_0000;
  localparam logic [31:0] SI_HI         = 32'h048F_FFFF;
  localparam logic [31:0] CART_D2A1_LO  = 32'h0500_0000;
  localparam logic [31:0] CART_D2A1_HI  = 32'h05FF_FFFF;
  localparam logic [31:0] CART_D1A2_LO  = 32'h1000_0000;
  localparam logic [31:0] CART_D1A2_HI  = 32'h1FBF_FFFF;
  localparam logic [31:0] PIF_ROM_LO    = 32'h1FC0_0000;
  localparam logic [31:0] PIF_ROM_HI    = 32'h1FC0_07BF;
  localparam logic [31:0] PIF_RAM_LO    = 32'h1FC0_07C0;
  localparam logic [31:0] PIF_RAM_HI    = 32'h1FC0_07FF;

  // ---- register offsets inside the register regions -------------------
  localparam logic [7:0] VI_ORIGIN_OFS       = 8'h04;
  localparam logic [7:0] AI_DATA_OFS         = 8'h00;  // write {L,R} sample
  localparam logic [7:0] AI_STATUS_OFS       = 8'h0C;
  localparam logic [7:0] PI_DRAM_ADDR_OFS    = 8'h00;
  localparam logic [7:0] PI_CART_ADDR_OFS    = 8'h04;
  localparam logic [7:0] PI_WR_LEN_OFS       = 8'h0C;  // cart -> RDRAM, len-1
  localparam logic [7:0] PI_STATUS_OFS       = 8'h10;
  localparam logic [7:0] SI_DRAM_ADDR_OFS    = 8'h00;
  localparam logic [7:0] SI_PIF_RD64B_OFS    = 8'h04;  // PIF RAM -> RDRAM
  localparam logic [7:0] SI_PIF_WR64B_OFS    = 8'h10;  // RDRAM -> PIF RAM
  localparam logic [7:0] SI_STATUS_OFS       = 8'h18;

  // ---- controller (joybus) commands -----------------------------------
  localparam logic [31:0] JB_CMD_IDENTIFY = 32'h0000_0000;
  localparam logic [31:0] JB_CMD_POLL     = 32'h0000_0001;
  localparam logic [31:0] JB_CMD_RESET    = 32'hFFFF_FFFF;

  // byte lane helpers (big-endian)
  function automatic logic [7:0] be_byte(input logic [63:0] d, input logic [2:0] k);
    return d[63-8*k -: 8];
  endfunction

endpackage
