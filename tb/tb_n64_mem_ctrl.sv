// tb_n64_mem_ctrl: memory controller with the behavioural cellular RAM and a
// behavioural cartridge port (answers in the same cycle with the cartridge
// image n64_tb_pkg::sd_byte). Drives the CPU port like the CPU and checks
// every segment of the address map: RDRAM in cellular RAM, the frame-buffer
// window in block RAM (also through the video read port), SP memory, PIF ROM
// (loaded through the load port), PIF RAM and the serial-interface start,
// cartridge reads, unmapped space, VI_ORIGIN with its first write ignored,
// AI sample pushes, a PI DMA from cartridge to RDRAM during which a CPU
// access must wait, and SI DMAs in both directions.
`timescale 1ns/1ps
module tb_n64_mem_ctrl;
  import n64_pkg::*;
  import n64_tb_pkg::*;
  logic clk = 0, rst = 1;
  always #10 clk = ~clk;
  mem_req_t cpu_req = '0; mem_rsp_t cpu_rsp;
  logic [22:0] ram_a; logic [15:0] ram_dq_o, ram_dq_i;
  logic ram_dq_oe, ram_ce_n, ram_oe_n, ram_we_n, ram_ub_n, ram_lb_n, ram_adv_n, ram_cre, ram_clk;
  logic [14:0] fb_b_addr = 0; logic [63:0] fb_b_rdata;
  logic [31:0] pif_b_rdata;
  logic si_start, pi_req, pi_ack, ai_push; logic [31:0] pi_addr, ai_wdata; logic [63:0] pi_rdata;
  logic rom_ld_we = 0; logic [7:0] rom_ld_addr = 0; logic [63:0] rom_ld_data = 0;
  logic [31:0] fb_base, n_origin_writes, n_dma, n_dma_stall;
  int checks = 0, failures = 0, n_si_start = 0, n_ai = 0;
  logic [31:0] last_ai = 0;

  n64_mem_ctrl dut (.clk, .rst, .cpu_req, .cpu_rsp, .ram_a, .ram_dq_o, .ram_dq_oe, .ram_dq_i, .ram_ce_n,
    .ram_oe_n, .ram_we_n, .ram_ub_n, .ram_lb_n, .ram_adv_n, .ram_cre, .ram_clk, .fb_b_addr, .fb_b_rdata,
    .pif_b_addr(4'd0), .pif_b_we(1'b0), .pif_b_wdata(32'd0), .pif_b_rdata, .si_start, .si_busy(1'b0),
    .pi_req, .pi_addr, .pi_ack, .pi_rdata, .pi_waiting(1'b0), .ai_push, .ai_wdata, .ai_full(1'b0),
    .ai_level(8'd3), .rom_ld_we, .rom_ld_addr, .rom_ld_data, .fb_base, .n_origin_writes, .n_dma, .n_dma_stall);
  n64_tb_cellram ram (.a(ram_a), .dq_in(ram_dq_o), .dq_oe(ram_dq_oe), .dq_out(ram_dq_i), .ce_n(ram_ce_n),
    .oe_n(ram_oe_n), .we_n(ram_we_n), .ub_n(ram_ub_n), .lb_n(ram_lb_n), .adv_n(ram_adv_n), .cre(ram_cre), .clk(ram_clk));

  always_comb begin
    pi_ack = pi_req;
    for (int k = 0; k < 8; k++) pi_rdata[63-8*k -: 8] = sd_byte(pi_addr + 32'(k));
  end
  always @(posedge clk) begin
    if (!rst && si_start) n_si_start++;
    if (!rst && ai_push) begin n_ai++; last_ai = ai_wdata; end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask
  task automatic bus(input bit w, input logic [31:0] a, input logic [63:0] wd, input logic [7:0] be,
                     output logic [63:0] d);
    @(negedge clk); cpu_req = '{req: 1'b1, we: w, addr: a, wdata: wd, be: be};
    do @(negedge clk); while (!cpu_rsp.ack);
    d = cpu_rsp.rdata;
    @(posedge clk); #1; cpu_req = '0;
  endtask
  task automatic wr32(input logic [31:0] a, input logic [31:0] v);
    logic [63:0] d;
    bus(1, a, {v, v}, a[2] ? 8'h0F : 8'hF0, d);
  endtask
  task automatic rd32(input logic [31:0] a, output logic [31:0] v);
    logic [63:0] d;
    bus(0, a, 64'h0, 8'hFF, d);
    v = a[2] ? d[31:0] : d[63:32];
  endtask
  task automatic wr64(input logic [31:0] a, input logic [63:0] v);
    logic [63:0] d;
    bus(1, a, v, 8'hFF, d);
  endtask
  task automatic rd64(input logic [31:0] a, output logic [63:0] v);
    bus(0, a, 64'h0, 8'hFF, v);
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [63:0] d, e; logic [31:0] v;
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); rom_ld_we = 1; rom_ld_addr = 8'(i); rom_ld_data = {32'hC0DE_0000 + 32'(i), 32'(i)};
    end
    @(negedge clk); rom_ld_we = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    // RDRAM in cellular RAM
    wr64(32'h0000_1000, 64'h0102_0304_0506_0708);
    bus(1, 32'h0000_1000, 64'hAA00_0000_0000_00BB, 8'h81, d);
    rd64(32'h0000_1000, d); chk(d == 64'hAA02_0304_0506_07BB, "RDRAM byte enables");
    chk(ram.n_writes > 0 && ram.timing_errors == 0, "cellular RAM used, no timing errors");
    // frame-buffer window
    chk(fb_base == 32'h0010_0000, "frame-buffer base after reset");
    wr64(32'h0010_0008, 64'h1111_2222_3333_4444);
    rd64(32'h0010_0008, d); chk(d == 64'h1111_2222_3333_4444, "frame buffer through CPU port");
    @(negedge clk); fb_b_addr = 15'd1; @(posedge clk); #1;
    chk(fb_b_rdata == 64'h1111_2222_3333_4444, "frame buffer through video port");
    // VI_ORIGIN: first write ignored
    wr32(32'h0440_0004, 32'h0020_0000);
    chk(fb_base == 32'h0010_0000 && n_origin_writes == 1, "first VI_ORIGIN write ignored");
    wr32(32'h0440_0004, 32'h0020_0000);
    chk(fb_base == 32'h0020_0000, "second VI_ORIGIN write moves the window");
    wr64(32'h0020_0010, 64'h5555_6666_7777_8888);
    @(negedge clk); fb_b_addr = 15'd2; @(posedge clk); #1;
    chk(fb_b_rdata == 64'h5555_6666_7777_8888, "moved window is block RAM");
    // SP memory
    wr64(32'h0400_0010, 64'hDEAD_BEEF_0BAD_F00D);
    wr64(32'h0400_1010, 64'h1234_5678_9ABC_DEF0);
    rd64(32'h0400_0010, d); chk(d == 64'hDEAD_BEEF_0BAD_F00D, "SP DMEM");
    rd64(32'h0400_1010, d); chk(d == 64'h1234_5678_9ABC_DEF0, "SP IMEM");
    // PIF ROM and PIF RAM
    rd64(32'h1FC0_0008, d); chk(d == {32'hC0DE_0001, 32'd1}, "PIF ROM");
    wr64(32'h1FC0_07C0, 64'h0000_0001_FFFF_FFFF);
    rd64(32'h1FC0_07C0, d); chk(d == 64'h0000_0001_FFFF_FFFF, "PIF RAM");
    chk(n_si_start == 0, "no SI start yet");
    wr32(32'h1FC0_07FC, 32'h1);
    chk(n_si_start == 1, "status write starts the serial interface");
    // cartridge
    rd64(32'h1000_0040, d);
    for (int k = 0; k < 8; k++) e[63-8*k -: 8] = sd_byte(32'h40 + 32'(k));
    chk(d == e, "cartridge read");
    // unmapped
    rd64(32'h0800_0000, d); chk(d == 64'h0, "unmapped reads zero");
    // AI
    wr32(32'h0450_0000, 32'hABCD_1234);
    repeat (2) @(posedge clk);
    chk(n_ai == 1 && last_ai == 32'hABCD_1234, "AI sample pushed");
    rd32(32'h0450_000C, v); chk(v[7:0] == 8'd3, "AI status shows the level");
    // PI DMA: 64 bytes from cartridge offset 0x100 to RDRAM 0x2000
    wr32(32'h0460_0000, 32'h0000_2000);
    wr32(32'h0460_0004, 32'h1000_0100);
    wr32(32'h0460_000C, 32'd63);
    rd64(32'h0000_1000, d);                   // must wait for the DMA
    chk(d == 64'hAA02_0304_0506_07BB, "CPU access after DMA");
    chk(n_dma == 1 && n_dma_stall > 0, "CPU stalled during PI DMA");
    for (int i = 0; i < 8; i++) begin
      rd64(32'h0000_2000 + 32'(8 * i), d);
      for (int k = 0; k < 8; k++) e[63-8*k -: 8] = sd_byte(32'h100 + 32'(8 * i + k));
      chk(d == e, "PI DMA data");
    end
    // SI DMA RDRAM -> PIF RAM, then PIF RAM -> RDRAM elsewhere
    wr32(32'h0480_0000, 32'h0000_2000);
    wr32(32'h0480_0010, 32'h1FC0_07C0);
    rd64(32'h1FC0_07C8, d);
    for (int k = 0; k < 8; k++) e[63-8*k -: 8] = sd_byte(32'h108 + 32'(k));
    chk(d == e, "SI DMA to PIF RAM");
    wr32(32'h0480_0000, 32'h0000_3000);
    wr32(32'h0480_0004, 32'h1FC0_07C0);
    rd64(32'h0000_3008, d); chk(d == e, "SI DMA from PIF RAM");
    chk(n_dma == 3, "three DMAs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
