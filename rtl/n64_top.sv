// n64_top: the FPGA Nintendo 64 system without its graphics co-processor.
//
// The CPU (with its instruction and data caches and memory interface) talks
// only to the memory controller, which owns every memory segment: cellular
// RAM as main memory, the block-RAM frame buffer, PIF ROM and PIF RAM, SP
// memories, the memory-mapped registers and the DMA engine. Around it sit
// the serial interface (game controllers), the peripheral interface with the
// SD card controller (the SD card stands in for the cartridge), the video
// interface with its VGA timing generator, and the audio interface driving an
// I2S PCM DAC.
//
// Clocks: clk is the 50 MHz system clock; clk4 is the 4 MHz controller clock
// (both from the FPGA's clock tiles). The VGA pixel rate is clk/2. External
// parts reached through ports: the cellular RAM chip, the SD card, the
// controllers' open-drain data lines, the VGA connector, the PCM DAC, and a
// load port that fills the PIF boot ROM while rst is held (on the FPGA the
// image comes with the bitstream). The FPU is not part of the system, as it
// was never integrated with the CPU in the design this follows.
`timescale 1ns/1ps
module n64_top
  import n64_pkg::*;
#(
  parameter int unsigned NUM_CTRL       = 2,
  parameter int unsigned POLL_GAP       = 18750,
  parameter int unsigned SD_POWERUP_CYC = 50000,
  parameter logic [7:0]  SD_INIT_HALF   = 8'd63,
  parameter int unsigned AI_MCLK_LOG2   = 1,
  parameter int unsigned JB_US_CYC      = 4
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                clk4,
  input  logic                rst4,
  // PIF ROM load port
  input  logic                rom_ld_we,
  input  logic [7:0]          rom_ld_addr,
  input  logic [63:0]         rom_ld_data,
  // cellular RAM
  output logic [22:0]         ram_a,
  output logic [15:0]         ram_dq_o,
  output logic                ram_dq_oe,
  input  logic [15:0]         ram_dq_i,
  output logic                ram_ce_n,
  output logic                ram_oe_n,
  output logic                ram_we_n,
  output logic                ram_ub_n,
  output logic                ram_lb_n,
  output logic                ram_adv_n,
  output logic                ram_cre,
  output logic                ram_clk,
  // SD card (SPI mode)
  output logic                sd_sclk,
  output logic                sd_mosi,
  input  logic                sd_miso,
  output logic                sd_cs_n,
  // controllers
  output logic [NUM_CTRL-1:0] jb_oe,
  input  logic [NUM_CTRL-1:0] jb_in,
  // VGA
  output logic [3:0]          vga_r,
  output logic [3:0]          vga_g,
  output logic [3:0]          vga_b,
  output logic                vga_hs,
  output logic                vga_vs,
  // I2S DAC
  output logic                i2s_mclk,
  output logic                i2s_sclk,
  output logic                i2s_lrck,
  output logic                i2s_sdata
);
  // ---- CPU and its memory path --------------------------------------------
  mem_req_t cpu_i_req, cpu_d_req, ic_m_req, dc_m_req, bus_req;
  mem_rsp_t cpu_i_rsp, cpu_d_rsp, ic_m_rsp, dc_m_rsp, bus_rsp;
  logic     i_cached, d_cached, cache_op, cache_op_ic;
  logic [31:0] cache_op_addr;
  logic [31:0] n_retired, n_fwd, n_load_use, n_taken, n_likely_null, n_md_stall;
  logic [63:0] dbg_r2;
  logic [31:0] ic_hits, ic_misses, dc_hits, dc_misses, dc_wbs;

  n64_cpu u_cpu (
    .clk, .rst, .i_req(cpu_i_req), .i_rsp(cpu_i_rsp), .i_cached,
    .d_req(cpu_d_req), .d_rsp(cpu_d_rsp), .d_cached,
    .cache_op, .cache_op_icache(cache_op_ic), .cache_op_addr,
    .n_retired, .n_fwd, .n_load_use, .n_taken, .n_likely_null, .n_md_stall,
    .dbg_r2);

  n64_icache u_icache (
    .clk, .rst, .c_req(cpu_i_req), .c_cached(i_cached), .c_rsp(cpu_i_rsp),
    .m_req(ic_m_req), .m_rsp(ic_m_rsp), .inv(cache_op && cache_op_ic),
    .inv_addr(cache_op_addr), .n_hits(ic_hits), .n_misses(ic_misses));

  n64_dcache u_dcache (
    .clk, .rst, .c_req(cpu_d_req), .c_cached(d_cached), .c_rsp(cpu_d_rsp),
    .m_req(dc_m_req), .m_rsp(dc_m_rsp), .inv(cache_op && !cache_op_ic),
    .inv_addr(cache_op_addr), .n_hits(dc_hits), .n_misses(dc_misses),
    .n_writebacks(dc_wbs));

  n64_cpu_memif u_memif (
    .clk, .rst, .i_req(ic_m_req), .i_rsp(ic_m_rsp), .d_req(dc_m_req),
    .d_rsp(dc_m_rsp), .m_req(bus_req), .m_rsp(bus_rsp));

  // ---- memory controller ---------------------------------------------------
  localparam int unsigned FB_AW = $clog2(320 * 240 / 4);
  logic [FB_AW-1:0] fb_b_addr;
  logic [63:0]      fb_b_rdata;
  logic [3:0]       pif_b_addr;
  logic             pif_b_we, si_start, si_busy;
  logic [31:0]      pif_b_wdata, pif_b_rdata;
  logic             pi_req, pi_ack, pi_waiting;
  logic [31:0]      pi_addr;
  logic [63:0]      pi_rdata;
  logic             ai_push, ai_full;
  logic [31:0]      ai_wdata;
  logic [4:0]       ai_level;
  logic [31:0]      fb_base, n_origin_writes, n_dma, n_dma_stall;

  n64_mem_ctrl u_mem (
    .clk, .rst, .cpu_req(bus_req), .cpu_rsp(bus_rsp),
    .ram_a, .ram_dq_o, .ram_dq_oe, .ram_dq_i, .ram_ce_n, .ram_oe_n, .ram_we_n,
    .ram_ub_n, .ram_lb_n, .ram_adv_n, .ram_cre, .ram_clk,
    .fb_b_addr, .fb_b_rdata,
    .pif_b_addr, .pif_b_we, .pif_b_wdata, .pif_b_rdata, .si_start, .si_busy,
    .pi_req, .pi_addr, .pi_ack, .pi_rdata, .pi_waiting,
    .ai_push, .ai_wdata, .ai_full, .ai_level({3'd0, ai_level}),
    .rom_ld_we, .rom_ld_addr, .rom_ld_data,
    .fb_base, .n_origin_writes, .n_dma, .n_dma_stall);

  // ---- serial interface ----------------------------------------------------
  logic [31:0] si_transfers;
  n64_si #(.NUM_CTRL(NUM_CTRL), .POLL_GAP(POLL_GAP), .JB_US_CYC(JB_US_CYC)) u_si (
    .clk, .rst, .clk4, .rst4, .start(si_start), .busy(si_busy),
    .ram_addr(pif_b_addr), .ram_we(pif_b_we), .ram_wdata(pif_b_wdata),
    .ram_rdata(pif_b_rdata), .jb_oe, .jb_in, .n_transfers(si_transfers));

  // ---- cartridge: peripheral interface and SD card -------------------------
  logic        sd_ready, sd_error, sd_rd_req, sd_dv, sd_done;
  logic [31:0] sd_rd_addr, pi_fills, pi_splits;
  logic [7:0]  sd_byte;

  n64_pi u_pi (
    .clk, .rst, .req(pi_req), .addr(pi_addr), .ack(pi_ack), .rdata(pi_rdata),
    .waiting(pi_waiting), .sd_ready, .sd_rd_req, .sd_rd_addr,
    .sd_data_valid(sd_dv), .sd_data_byte(sd_byte), .sd_rd_done(sd_done),
    .n_fills(pi_fills), .n_splits(pi_splits));

  n64_sd_spi #(.POWERUP_CYC(SD_POWERUP_CYC), .INIT_HALF(SD_INIT_HALF)) u_sd (
    .clk, .rst, .ready(sd_ready), .error(sd_error), .rd_req(sd_rd_req),
    .rd_addr(sd_rd_addr), .data_valid(sd_dv), .data_byte(sd_byte),
    .rd_done(sd_done), .sd_sclk, .sd_mosi, .sd_miso, .sd_cs_n);

  // ---- video -----------------------------------------------------------------
  logic        pix_en, v_active, v_hs, v_vs, v_frame;
  logic [10:0] v_x, v_y;
  always_ff @(posedge clk) pix_en <= rst ? 1'b0 : !pix_en;

  n64_vga_timing u_vga (
    .clk, .rst, .pix_en, .x(v_x), .y(v_y), .active(v_active),
    .hsync(v_hs), .vsync(v_vs), .frame_start(v_frame));

  n64_vi u_vi (
    .clk, .rst, .x(v_x), .y(v_y), .active(v_active), .hsync_in(v_hs),
    .vsync_in(v_vs), .fb_addr(fb_b_addr), .fb_rdata(fb_b_rdata),
    .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs);

  // ---- audio -----------------------------------------------------------------
  logic ai_underrun;
  n64_ai #(.FIFO_DEPTH(16), .MCLK_LOG2(AI_MCLK_LOG2)) u_ai (
    .clk, .rst, .push(ai_push), .wdata(ai_wdata), .full(ai_full),
    .level(ai_level), .underrun(ai_underrun), .i2s_mclk, .i2s_sclk,
    .i2s_lrck, .i2s_sdata);
endmodule
