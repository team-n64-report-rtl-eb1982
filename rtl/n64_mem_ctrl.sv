// n64_mem_ctrl: memory controller. Decodes the N64 physical address map and
// routes each system-bus access to the memory segment that holds it.
//
// Segments: RDRAM (0x0000_0000..0x03EF_FFFF) in the cellular RAM, except the
// frame-buffer window, which is remapped into dual-port block RAM; SP DMEM
// and IMEM (1 KB each, 0x0400_0000 and 0x0400_1000); memory-mapped register
// regions 0x03F0_0000 and 0x0400_0000..0x048F_FFFF; cartridge domain 1
// address 2 (0x1000_0000..0x1FBF_FFFF) through the peripheral interface;
// PIF ROM (0x1FC0_0000..0x1FC0_07BF) and PIF RAM (0x1FC0_07C0..0x1FC0_07FF).
// Anything else reads as zero and ignores writes.
//
// Most registers only hold what is written (16 words per region). The ones
// with a function: VI_ORIGIN (0x0440_0004) sets the frame-buffer window
// base, ignoring the first SKIP_ORIGIN writes (a game that switches frame
// buffer once is shown from its second buffer); AI data (0x0450_0000) pushes
// a stereo sample, AI status (0x0450_000C) shows {full, level};
// PI_DRAM_ADDR/PI_CART_ADDR/PI_WR_LEN (0x0460_0000/04/0C) start a
// cartridge-to-RDRAM DMA of PI_WR_LEN+1 bytes; PI status (0x0460_0010) bit 0
// is DMA busy and bit 1 the cartridge still initialising; SI_DRAM_ADDR
// (0x0480_0000) with SI_PIF_ADDR_RD64B/WR64B (0x0480_0004/10) start 64-byte
// DMAs PIF RAM to RDRAM and RDRAM to PIF RAM; SI status (0x0480_0018) bit 0
// is busy. Writing PIF RAM bytes 60..63 with bit 0 set (by CPU or DMA)
// starts the serial interface.
//
// Timing: one access at a time. Block-RAM segments answer two cycles after
// the request, registers and unmapped space one cycle after, the cartridge
// and cellular RAM when their controllers finish. While a DMA runs, only the
// DMA engine is served and the CPU waits (the CPU sees the DMA as
// instantaneous). The address map, segment placement, register behaviour
// and DMA stall follow the report; register offsets, the frame-buffer reset
// base and the single-access timing are this design's choices.
`timescale 1ns/1ps
module n64_mem_ctrl
  import n64_pkg::*;
#(
  parameter int unsigned SP_MEM_BYTES  = 1024,
  parameter int unsigned SKIP_ORIGIN   = 1,
  parameter logic [31:0] FB_BASE_RESET = 32'h0010_0000,
  parameter int unsigned FB_W          = 320,
  parameter int unsigned FB_H          = 240,
  parameter int unsigned RAM_ACCESS_CYC = 4,
  localparam int unsigned FB_AW        = $clog2(FB_W * FB_H / 4),
  localparam int unsigned FB_BYTES     = FB_W * FB_H * 2,
  localparam int unsigned ROM_AW       = $clog2(1984 / 8),
  localparam int unsigned SPW          = SP_MEM_BYTES / 8
) (
  input  logic              clk,
  input  logic              rst,
  // CPU
  input  mem_req_t          cpu_req,
  output mem_rsp_t          cpu_rsp,
  // cellular RAM pins
  output logic [22:0]       ram_a,
  output logic [15:0]       ram_dq_o,
  output logic              ram_dq_oe,
  input  logic [15:0]       ram_dq_i,
  output logic              ram_ce_n,
  output logic              ram_oe_n,
  output logic              ram_we_n,
  output logic              ram_ub_n,
  output logic              ram_lb_n,
  output logic              ram_adv_n,
  output logic              ram_cre,
  output logic              ram_clk,
  // video interface read port of the frame buffer
  input  logic [FB_AW-1:0]  fb_b_addr,
  output logic [63:0]       fb_b_rdata,
  // serial interface side of PIF RAM
  input  logic [3:0]        pif_b_addr,
  input  logic              pif_b_we,
  input  logic [31:0]       pif_b_wdata,
  output logic [31:0]       pif_b_rdata,
  output logic              si_start,
  input  logic              si_busy,
  // peripheral interface (cartridge)
  output logic              pi_req,
  output logic [31:0]       pi_addr,
  input  logic              pi_ack,
  input  logic [63:0]       pi_rdata,
  input  logic              pi_waiting,
  // audio interface
  output logic              ai_push,
  output logic [31:0]       ai_wdata,
  input  logic              ai_full,
  input  logic [7:0]        ai_level,
  // PIF ROM load port
  input  logic              rom_ld_we,
  input  logic [ROM_AW-1:0] rom_ld_addr,
  input  logic [63:0]       rom_ld_data,
  // observation
  output logic [31:0]       fb_base,
  output logic [31:0]       n_origin_writes,
  output logic [31:0]       n_dma,
  output logic [31:0]       n_dma_stall
);
  typedef enum logic [2:0] {T_NONE, T_RAM, T_FB, T_SPMEM, T_REG, T_CART,
                            T_PIFROM, T_PIFRAM} target_t;
  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_DATA} state_t;
  state_t   state;
  target_t  tgt;
  logic     from_dma;
  mem_req_t cur;

  // ---- DMA engine ------------------------------------------------------
  mem_req_t dma_req;
  mem_rsp_t dma_rsp;
  logic     dma_start, dma_busy, dma_done;
  logic [31:0] dma_src, dma_dst, dma_len, dma_chunks;

  n64_dma u_dma (.clk, .rst, .start(dma_start), .src(dma_src), .dst(dma_dst),
                 .len(dma_len), .busy(dma_busy), .done(dma_done),
                 .m_req(dma_req), .m_rsp(dma_rsp), .n_chunks(dma_chunks));

  // ---- decode ------------------------------------------------------------
  function automatic target_t decode(input logic [31:0] a, input logic [31:0] fbb);
    if (a <= RDRAM_END) begin
      if (a >= fbb && a < fbb + FB_BYTES) return T_FB;
      return T_RAM;
    end
    if (a >= RDRAM_REG_LO && a <= SI_HI) begin
      if (a[31:20] == SP_LO[31:20] && a[19:13] == 7'd0) return T_SPMEM;
      return T_REG;
    end
    if (a >= CART_D1A2_LO && a <= CART_D1A2_HI) return T_CART;
    if (a >= PIF_ROM_LO && a <= PIF_ROM_HI) return T_PIFROM;
    if (a >= PIF_RAM_LO && a <= PIF_RAM_HI) return T_PIFRAM;
    return T_NONE;
  endfunction

  // ---- memories ------------------------------------------------------------
  logic [63:0] fb_a_rdata, rom_rdata, pif_a_rdata, sp_rdata, ram_rdata;
  logic        ram_ack;
  logic [63:0] spmem [2*SPW];

  wire issue = (state == S_ISSUE);
  wire [31:0] fb_off = cur.addr - fb_base;

  n64_framebuffer #(.WIDTH(FB_W), .HEIGHT(FB_H)) u_fb (
    .clk, .a_addr(FB_AW'(fb_off >> 3)), .a_we(issue && tgt == T_FB && cur.we),
    .a_be(cur.be), .a_wdata(cur.wdata), .a_rdata(fb_a_rdata),
    .b_addr(fb_b_addr), .b_rdata(fb_b_rdata));

  n64_pifrom u_rom (.clk, .addr(cur.addr[ROM_AW+2:3]), .rdata(rom_rdata),
    .ld_we(rom_ld_we), .ld_addr(rom_ld_addr), .ld_data(rom_ld_data));

  wire pif_a_we = issue && tgt == T_PIFRAM && cur.we;
  n64_pifram u_pif (.clk, .a_addr(cur.addr[5:3]), .a_we(pif_a_we), .a_be(cur.be),
    .a_wdata(cur.wdata), .a_rdata(pif_a_rdata), .b_addr(pif_b_addr),
    .b_we(pif_b_we), .b_wdata(pif_b_wdata), .b_rdata(pif_b_rdata));

  // SP DMEM (a[12] = 0) and IMEM (a[12] = 1), each SP_MEM_BYTES, mirrored
  wire [$clog2(2*SPW)-1:0] sp_idx = {cur.addr[12], cur.addr[$clog2(SPW)+2:3]};
  always_ff @(posedge clk) begin
    if (issue && tgt == T_SPMEM && cur.we)
      for (int k = 0; k < 8; k++)
        if (cur.be[7-k]) spmem[sp_idx][63-8*k -: 8] <= cur.wdata[63-8*k -: 8];
    sp_rdata <= spmem[sp_idx];
  end

  n64_cellram_ctrl #(.ACCESS_CYC(RAM_ACCESS_CYC)) u_ram (
    .clk, .rst, .req(issue && tgt == T_RAM), .we(cur.we), .addr(cur.addr[23:0]),
    .wdata(cur.wdata), .be(cur.be), .ack(ram_ack), .rdata(ram_rdata),
    .ram_a, .ram_dq_o, .ram_dq_oe, .ram_dq_i, .ram_ce_n, .ram_oe_n, .ram_we_n,
    .ram_ub_n, .ram_lb_n, .ram_adv_n, .ram_cre, .ram_clk);

  assign pi_req  = issue && tgt == T_CART && !cur.we;
  assign pi_addr = cur.addr - CART_D1A2_LO;

  // ---- registers -----------------------------------------------------------
  logic [31:0] regs [10][16];
  logic [31:0] pi_dram, pi_cart, si_dram;
  wire  [3:0]  reg_rgn = (cur.addr[31:20] == RDRAM_REG_LO[31:20]) ? 4'd9 : cur.addr[23:20];
  wire  [3:0]  reg_idx = cur.addr[5:2];
  wire  [7:0]  reg_ofs = {cur.addr[7:2], 2'b00};
  wire  [31:0] reg_wd  = cur.addr[2] ? cur.wdata[31:0] : cur.wdata[63:32];
  logic [31:0] reg_rd;

  always_comb begin
    reg_rd = (reg_rgn <= 4'd9) ? regs[reg_rgn][reg_idx] : 32'h0;
    if (cur.addr[31:20] == AI_LO[31:20] && reg_ofs == AI_STATUS_OFS)
      reg_rd = {ai_full, 23'd0, ai_level};
    if (cur.addr[31:20] == PI_LO[31:20] && reg_ofs == PI_STATUS_OFS)
      reg_rd = {30'd0, pi_waiting, dma_busy};
    if (cur.addr[31:20] == SI_LO[31:20] && reg_ofs == SI_STATUS_OFS)
      reg_rd = {31'd0, dma_busy || si_busy};
  end

  wire reg_we = issue && tgt == T_REG && cur.we;

  always_ff @(posedge clk) begin
    dma_start <= 1'b0;
    ai_push   <= 1'b0;
    if (rst) begin
      for (int r = 0; r < 10; r++) for (int i = 0; i < 16; i++) regs[r][i] <= '0;
      fb_base <= FB_BASE_RESET; n_origin_writes <= '0;
      pi_dram <= '0; pi_cart <= '0; si_dram <= '0;
      dma_src <= '0; dma_dst <= '0; dma_len <= '0; ai_wdata <= '0;
    end else if (reg_we) begin
      if (reg_rgn <= 4'd9) regs[reg_rgn][reg_idx] <= reg_wd;
      unique case (cur.addr[31:20])
        VI_LO[31:20]: if (reg_ofs == VI_ORIGIN_OFS) begin
          n_origin_writes <= n_origin_writes + 1;
          if (n_origin_writes >= SKIP_ORIGIN) fb_base <= {8'd0, reg_wd[23:0]};
        end
        AI_LO[31:20]: if (reg_ofs == AI_DATA_OFS) begin
          ai_push <= 1'b1; ai_wdata <= reg_wd;
        end
        PI_LO[31:20]: begin
          if (reg_ofs == PI_DRAM_ADDR_OFS) pi_dram <= reg_wd;
          if (reg_ofs == PI_CART_ADDR_OFS) pi_cart <= reg_wd;
          if (reg_ofs == PI_WR_LEN_OFS) begin
            dma_src <= pi_cart; dma_dst <= {8'd0, pi_dram[23:0]};
            dma_len <= reg_wd + 32'd1; dma_start <= 1'b1;
          end
        end
        SI_LO[31:20]: begin
          if (reg_ofs == SI_DRAM_ADDR_OFS) si_dram <= reg_wd;
          if (reg_ofs == SI_PIF_RD64B_OFS) begin
            dma_src <= PIF_RAM_LO; dma_dst <= {8'd0, si_dram[23:0]};
            dma_len <= 32'd64; dma_start <= 1'b1;
          end
          if (reg_ofs == SI_PIF_WR64B_OFS) begin
            dma_src <= {8'd0, si_dram[23:0]}; dma_dst <= PIF_RAM_LO;
            dma_len <= 32'd64; dma_start <= 1'b1;
          end
        end
        default: ;
      endcase
    end
  end

  assign si_start = pif_a_we && cur.addr[5:3] == 3'd7 && cur.be[0] && cur.wdata[0];

  // ---- access sequencing -----------------------------------------------
  logic        ack;
  logic [63:0] rdata;

  always_comb begin
    ack   = 1'b0;
    rdata = 64'h0;
    if (state == S_ISSUE) begin
      unique case (tgt)
        T_RAM:   begin ack = ram_ack; rdata = ram_rdata; end
        T_CART:  begin ack = cur.we || pi_ack; rdata = pi_rdata; end
        T_REG:   begin ack = 1'b1; rdata = {reg_rd, reg_rd}; end
        T_NONE:  ack = 1'b1;
        default: ;
      endcase
    end else if (state == S_DATA) begin
      ack = 1'b1;
      unique case (tgt)
        T_FB:     rdata = fb_a_rdata;
        T_SPMEM:  rdata = sp_rdata;
        T_PIFROM: rdata = rom_rdata;
        T_PIFRAM: rdata = pif_a_rdata;
        default:  rdata = 64'h0;
      endcase
    end
  end

  assign cpu_rsp.ack   = ack && !from_dma;
  assign cpu_rsp.rdata = rdata;
  assign dma_rsp.ack   = ack && from_dma;
  assign dma_rsp.rdata = rdata;

  wire dma_wants = dma_busy || dma_start;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE; tgt <= T_NONE; from_dma <= 1'b0; cur <= '0;
      n_dma <= '0; n_dma_stall <= '0;
    end else begin
      if (dma_start) n_dma <= n_dma + 1;
      if (dma_wants && cpu_req.req) n_dma_stall <= n_dma_stall + 1;
      unique case (state)
        S_IDLE: begin
          if (dma_busy && dma_req.req) begin
            cur <= dma_req; from_dma <= 1'b1;
            tgt <= decode(dma_req.addr, fb_base); state <= S_ISSUE;
          end else if (!dma_wants && cpu_req.req) begin
            cur <= cpu_req; from_dma <= 1'b0;
            tgt <= decode(cpu_req.addr, fb_base); state <= S_ISSUE;
          end
        end
        S_ISSUE: begin
          if (tgt == T_FB || tgt == T_SPMEM || tgt == T_PIFROM || tgt == T_PIFRAM)
            state <= S_DATA;
          else if (ack) state <= S_IDLE;
        end
        S_DATA: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
