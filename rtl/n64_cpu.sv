// n64_cpu: the main processor, a 64-bit MIPS III core in the style of the
// NEC VR4300 with the five classic stages: instruction fetch (IF), register
// fetch (RF), execute (EX), data-cache fetch (DC) and write back (WB).
//
// Fetch and data accesses leave the core on two system-bus ports (see
// n64_pkg); the memory interface module merges them onto one bus, with the
// instruction and data caches in front of it. Addresses are the sign-extended
// 32-bit segments: 0x8000_0000..0x9FFF_FFFF is cached, 0xA000_0000..
// 0xBFFF_FFFF uncached, both mapping to physical address vaddr[28:0]; there
// is no TLB. The core starts at RESET_PC (the PIF boot ROM, uncached).
//
// Pipeline rules:
// * Forwarding into EX from the DC and WB stages, with register 0 excluded
//   so that a write to r0 is never forwarded; the register file also
//   forwards a WB write to a same-cycle RF read.
// * A load followed by an instruction that uses its result stalls EX for one
//   cycle (the value is then forwarded from WB). While EX is held, its
//   operands keep picking up forwarded values so none is lost.
// * Branches and jumps resolve in EX and have one delay slot. The delay slot
//   must be in RF before the branch leaves EX. A taken branch discards the
//   instruction fetched after the delay slot; a branch-likely that is not
//   taken turns the delay slot into a bubble.
// * MULT/DIV and their unsigned and 64-bit forms hold EX until the
//   multiply/divide unit finishes, then write HI and LO directly.
// * A data access holds the pipeline until the bus acknowledges it; an empty
//   EX stage still takes the next instruction meanwhile, so the bubble is
//   squeezed out.
//
// Implemented: the integer ALU, shift, set, branch (incl. likely and
// and-link), jump, HI/LO, load and store instructions (byte to doubleword,
// and word/doubleword left/right), MFC0/MTC0 with a Count register that
// ticks every second cycle, CACHE (forwarded to the caches as an
// invalidate-by-address) and SYNC. Not implemented, as in the design this
// follows: interrupts and exceptions (ADD/SUB do not trap on overflow), the
// TLB, 32-bit-mode switching and the FPU. Unknown opcodes act as NOPs.
`timescale 1ns/1ps
module n64_cpu
  import n64_pkg::*;
#(
  parameter logic [63:0] RESET_PC = 64'hFFFF_FFFF_BFC0_0000
) (
  input  logic        clk,
  input  logic        rst,
  output mem_req_t    i_req,
  input  mem_rsp_t    i_rsp,
  output logic        i_cached,
  output mem_req_t    d_req,
  input  mem_rsp_t    d_rsp,
  output logic        d_cached,
  // CACHE instruction to the caches: pulses with the physical address
  output logic        cache_op,
  output logic        cache_op_icache,
  output logic [31:0] cache_op_addr,
  // observation counters
  output logic [31:0] n_retired,
  output logic [31:0] n_fwd,
  output logic [31:0] n_load_use,
  output logic [31:0] n_taken,
  output logic [31:0] n_likely_null,
  output logic [31:0] n_md_stall,
  output logic [63:0] dbg_r2          // register 2, for tests
);
  // --------------------------------------------------------------------
  // helpers
  function automatic logic [63:0] sx32(input logic [31:0] x);
    return {{32{x[31]}}, x};
  endfunction
  function automatic logic [31:0] phys(input logic [63:0] v);
    return {3'b000, v[28:0]};
  endfunction

  // --------------------------------------------------------------------
  // architectural state
  logic [63:0] gpr [32];
  logic [63:0] hi, lo;
  logic [63:0] cp0 [32];
  logic        count_div;

  // --------------------------------------------------------------------
  // IF stage
  logic [63:0] pc;
  logic        if_req, if_discard, fb_valid;
  logic [31:0] fb_ir;
  logic [31:0] if_addr;

  // RF stage
  logic        rf_valid;
  logic [63:0] rf_pc;
  logic [31:0] rf_ir;

  // EX stage
  logic        ex_valid;
  logic [63:0] ex_pc;
  logic [31:0] ex_ir;
  logic [63:0] ex_a, ex_b;

  // DC stage
  typedef enum logic [3:0] {LS_B, LS_H, LS_W, LS_D, LS_WL, LS_WR, LS_DL, LS_DR} ls_size_t;
  logic        dc_valid, dc_wr, dc_load, dc_store, dc_uns;
  ls_size_t    dc_size;
  logic [4:0]  dc_rd;
  logic [63:0] dc_res, dc_sdata;

  // WB stage
  logic        wb_valid, wb_wr;
  logic [4:0]  wb_rd;
  logic [63:0] wb_res;

  // --------------------------------------------------------------------
  // decode fields of EX
  wire [5:0]  op  = ex_ir[31:26];
  wire [4:0]  rs  = ex_ir[25:21];
  wire [4:0]  rt  = ex_ir[20:16];
  wire [4:0]  rd  = ex_ir[15:11];
  wire [4:0]  sa  = ex_ir[10:6];
  wire [5:0]  fn  = ex_ir[5:0];
  wire [63:0] simm = {{48{ex_ir[15]}}, ex_ir[15:0]};
  wire [63:0] zimm = {48'd0, ex_ir[15:0]};

  // forwarding into EX
  logic [63:0] fa, fb;
  logic        fwd_a, fwd_b;
  always_comb begin
    fa = ex_a; fb = ex_b; fwd_a = 1'b0; fwd_b = 1'b0;
    if (wb_valid && wb_wr && wb_rd != 0 && wb_rd == rs) begin fa = wb_res; fwd_a = 1'b1; end
    if (wb_valid && wb_wr && wb_rd != 0 && wb_rd == rt) begin fb = wb_res; fwd_b = 1'b1; end
    if (dc_valid && dc_wr && !dc_load && dc_rd != 0 && dc_rd == rs) begin fa = dc_res; fwd_a = 1'b1; end
    if (dc_valid && dc_wr && !dc_load && dc_rd != 0 && dc_rd == rt) begin fb = dc_res; fwd_b = 1'b1; end
  end

  wire load_use = ex_valid && dc_valid && dc_load && dc_wr && dc_rd != 0 &&
                  (dc_rd == rs || dc_rd == rt);

  // --------------------------------------------------------------------
  // EX combinational execute
  logic [63:0] x_res;
  logic        x_wr, x_load, x_store, x_uns, x_branch, x_taken, x_likely;
  logic [4:0]  x_rd;
  ls_size_t    x_size;
  logic [63:0] x_target;
  logic        x_md, x_mthi, x_mtlo, x_mtc0, x_cache;
  logic [2:0]  x_mdop;

  always_comb begin
    logic [63:0] sum;
    x_res = '0; x_wr = 1'b0; x_rd = rd; x_load = 1'b0; x_store = 1'b0;
    x_uns = 1'b0; x_size = LS_W; x_branch = 1'b0; x_taken = 1'b0;
    x_likely = 1'b0; x_target = '0; x_md = 1'b0; x_mdop = '0;
    x_mthi = 1'b0; x_mtlo = 1'b0; x_mtc0 = 1'b0; x_cache = 1'b0;
    sum = fa + simm;
    unique case (op)
      6'h00: begin // SPECIAL
        x_wr = 1'b1;
        unique case (fn)
          6'h00: x_res = sx32(fb[31:0] << sa);                          // SLL
          6'h02: x_res = sx32(fb[31:0] >> sa);                          // SRL
          6'h03: x_res = sx32(32'($signed(fb[31:0]) >>> sa));           // SRA
          6'h04: x_res = sx32(fb[31:0] << fa[4:0]);                     // SLLV
          6'h06: x_res = sx32(fb[31:0] >> fa[4:0]);                     // SRLV
          6'h07: x_res = sx32(32'($signed(fb[31:0]) >>> fa[4:0]));      // SRAV
          6'h08: begin x_wr = 1'b0; x_branch = 1'b1; x_taken = 1'b1; x_target = fa; end // JR
          6'h09: begin x_branch = 1'b1; x_taken = 1'b1; x_target = fa; x_res = ex_pc + 64'd8; end // JALR
          6'h0F: x_wr = 1'b0;                                           // SYNC
          6'h10: x_res = hi;                                            // MFHI
          6'h11: begin x_wr = 1'b0; x_mthi = 1'b1; end                  // MTHI
          6'h12: x_res = lo;                                            // MFLO
          6'h13: begin x_wr = 1'b0; x_mtlo = 1'b1; end                  // MTLO
          6'h14: x_res = fb << fa[5:0];                                 // DSLLV
          6'h16: x_res = fb >> fa[5:0];                                 // DSRLV
          6'h17: x_res = 64'($signed(fb) >>> fa[5:0]);                  // DSRAV
          6'h18, 6'h19, 6'h1A, 6'h1B, 6'h1C, 6'h1D, 6'h1E, 6'h1F: begin // MULT..DDIVU
            x_wr = 1'b0; x_md = 1'b1;
            x_mdop = {fn[2], fn[1], fn[0]};
          end
          6'h20, 6'h21: x_res = sx32(fa[31:0] + fb[31:0]);              // ADD, ADDU
          6'h22, 6'h23: x_res = sx32(fa[31:0] - fb[31:0]);              // SUB, SUBU
          6'h24: x_res = fa & fb;
          6'h25: x_res = fa | fb;
          6'h26: x_res = fa ^ fb;
          6'h27: x_res = ~(fa | fb);
          6'h2A: x_res = {63'd0, $signed(fa) < $signed(fb)};            // SLT
          6'h2B: x_res = {63'd0, fa < fb};                              // SLTU
          6'h2C, 6'h2D: x_res = fa + fb;                                // DADD, DADDU
          6'h2E, 6'h2F: x_res = fa - fb;                                // DSUB, DSUBU
          6'h38: x_res = fb << sa;                                      // DSLL
          6'h3A: x_res = fb >> sa;                                      // DSRL
          6'h3B: x_res = 64'($signed(fb) >>> sa);                       // DSRA
          6'h3C: x_res = fb << (6'd32 + 6'(sa));                        // DSLL32
          6'h3E: x_res = fb >> (6'd32 + 6'(sa));                        // DSRL32
          6'h3F: x_res = 64'($signed(fb) >>> (6'd32 + 6'(sa)));         // DSRA32
          default: x_wr = 1'b0;
        endcase
      end
      6'h01: begin // REGIMM
        x_branch = 1'b1;
        x_target = ex_pc + 64'd4 + (simm << 2);
        x_taken  = rt[0] ? !fa[63] : fa[63];      // BGEZ* : BLTZ*
        x_likely = rt[1];
        if (rt[4]) begin x_wr = 1'b1; x_rd = 5'd31; x_res = ex_pc + 64'd8; end
      end
      6'h02, 6'h03: begin // J, JAL
        x_branch = 1'b1; x_taken = 1'b1;
        x_target = {ex_pc[63:28] , ex_ir[25:0], 2'b00};
        if (op[0]) begin x_wr = 1'b1; x_rd = 5'd31; x_res = ex_pc + 64'd8; end
      end
      6'h04, 6'h05, 6'h06, 6'h07, 6'h14, 6'h15, 6'h16, 6'h17: begin // B*, B*L
        x_branch = 1'b1;
        x_likely = op[4];
        x_target = ex_pc + 64'd4 + (simm << 2);
        unique case (op[1:0])
          2'd0: x_taken = (fa == fb);
          2'd1: x_taken = (fa != fb);
          2'd2: x_taken = $signed(fa) <= 0;
          default: x_taken = $signed(fa) > 0;
        endcase
      end
      6'h08, 6'h09: begin x_wr = 1'b1; x_rd = rt; x_res = sx32(fa[31:0] + simm[31:0]); end
      6'h0A: begin x_wr = 1'b1; x_rd = rt; x_res = {63'd0, $signed(fa) < $signed(simm)}; end
      6'h0B: begin x_wr = 1'b1; x_rd = rt; x_res = {63'd0, fa < simm}; end
      6'h0C: begin x_wr = 1'b1; x_rd = rt; x_res = fa & zimm; end
      6'h0D: begin x_wr = 1'b1; x_rd = rt; x_res = fa | zimm; end
      6'h0E: begin x_wr = 1'b1; x_rd = rt; x_res = fa ^ zimm; end
      6'h0F: begin x_wr = 1'b1; x_rd = rt; x_res = sx32({ex_ir[15:0], 16'd0}); end
      6'h10: begin // COP0
        if (rs == 5'd0) begin x_wr = 1'b1; x_rd = rt; x_res = sx32(cp0[rd][31:0]); end // MFC0
        if (rs == 5'd1) begin x_wr = 1'b1; x_rd = rt; x_res = cp0[rd]; end             // DMFC0
        if (rs == 5'd4 || rs == 5'd5) x_mtc0 = 1'b1;                                  // MTC0
      end
      6'h18, 6'h19: begin x_wr = 1'b1; x_rd = rt; x_res = sum; end  // DADDI, DADDIU
      6'h1A: begin x_load = 1'b1; x_wr = 1'b1; x_rd = rt; x_size = LS_DL; x_res = sum; end
      6'h1B: begin x_load = 1'b1; x_wr = 1'b1; x_rd = rt; x_size = LS_DR; x_res = sum; end
      6'h20, 6'h24: begin x_load = 1'b1; x_wr = 1'b1; x_rd = rt; x_size = LS_B; x_uns = op[2]; x_res = sum; end
      6'h21, 6'h25: begin x_load = 1'b1; x_wr = 1'b1; x_rd = rt; x_size = LS_H; x_uns = op[2]; x_res = sum; end
      6'h22: begin x_load = 1'b1; x_wr = 1'b1; x_rd = rt; x_size = LS_WL; x_res = sum; end
      6'h23, 6'h27: begin x_load = 1'b1; x_wr = 1'b1; x_rd = rt; x_size = LS_W; x_uns = op[2]; x_res = sum; end
      6'h26: begin x_load = 1'b1; x_wr = 1'b1; x_rd = rt; x_size = LS_WR; x_res = sum; end
      6'h28: begin x_store = 1'b1; x_size = LS_B;  x_res = sum; end
      6'h29: begin x_store = 1'b1; x_size = LS_H;  x_res = sum; end
      6'h2A: begin x_store = 1'b1; x_size = LS_WL; x_res = sum; end
      6'h2B: begin x_store = 1'b1; x_size = LS_W;  x_res = sum; end
      6'h2C: begin x_store = 1'b1; x_size = LS_DL; x_res = sum; end
      6'h2D: begin x_store = 1'b1; x_size = LS_DR; x_res = sum; end
      6'h2E: begin x_store = 1'b1; x_size = LS_WR; x_res = sum; end
      6'h2F: begin x_cache = 1'b1; x_res = sum; end                   // CACHE
      6'h37: begin x_load = 1'b1; x_wr = 1'b1; x_rd = rt; x_size = LS_D; x_res = sum; end
      6'h3F: begin x_store = 1'b1; x_size = LS_D; x_res = sum; end
      default: ;
    endcase
    if (x_rd == 5'd0) x_wr = 1'b0;
  end

  // --------------------------------------------------------------------
  // multiply / divide
  logic md_busy, md_done, md_fin, md_start;
  logic [63:0] md_hi, md_lo;
  n64_muldiv u_md (.clk, .rst, .start(md_start), .op(x_mdop), .a(fa), .b(fb),
                   .busy(md_busy), .done(md_done), .hi(md_hi), .lo(md_lo));
  logic md_issued;
  assign md_start = ex_valid && x_md && !md_issued && !md_fin && !load_use;

  // --------------------------------------------------------------------
  // stalls
  wire dc_mem    = dc_valid && (dc_load || dc_store);
  wire stall_dc  = dc_mem && !d_rsp.ack;
  wire md_wait   = ex_valid && x_md && !md_fin;
  wire br_wait   = ex_valid && x_branch && !rf_valid;   // delay slot not yet here
  wire ex_busy   = load_use || md_wait || br_wait;
  wire stall_ex  = stall_dc || ex_busy;
  wire ex_adv    = !stall_ex;                           // EX -> DC and RF -> EX
  wire redirect  = ex_valid && ex_adv && x_branch && x_taken;
  wire nullify   = ex_valid && ex_adv && x_branch && x_likely && !x_taken;
  wire ex_load   = ex_adv || !ex_valid;                 // an empty EX refills even in a stall
  wire rf_load   = !rf_valid || ex_load;

  // --------------------------------------------------------------------
  // IF: one outstanding fetch, result kept in a one-entry fetch buffer
  assign i_req.req   = if_req;
  assign i_req.we    = 1'b0;
  assign i_req.addr  = if_addr;
  assign i_req.wdata = '0;
  assign i_req.be    = 8'hFF;
  assign i_cached    = (pc[31:29] == 3'b100);

  always_ff @(posedge clk) begin
    if (rst) begin
      pc <= RESET_PC; if_req <= 1'b0; if_discard <= 1'b0; fb_valid <= 1'b0;
      fb_ir <= '0; if_addr <= '0;
    end else begin
      // start a fetch when the buffer is empty and nothing is outstanding
      if (!if_req && !fb_valid && !redirect) begin
        if_req <= 1'b1; if_addr <= phys(pc);
      end
      if (if_req && i_rsp.ack) begin
        if_req <= 1'b0;
        if (!if_discard && !redirect) begin
          fb_valid <= 1'b1;
          fb_ir <= if_addr[2] ? i_rsp.rdata[31:0] : i_rsp.rdata[63:32];
        end
        if_discard <= 1'b0;
      end
      if (redirect) begin
        pc <= x_target;
        fb_valid <= 1'b0;
        if (if_req && !i_rsp.ack) if_discard <= 1'b1;
      end else if (rf_load && fb_valid) begin
        fb_valid <= 1'b0;
        pc <= pc + 64'd4;
      end
    end
  end

  // --------------------------------------------------------------------
  // RF: read the register file (with WB bypass)
  wire [4:0] rf_rs = rf_ir[25:21];
  wire [4:0] rf_rt = rf_ir[20:16];
  wire [63:0] rf_a = (wb_valid && wb_wr && wb_rd == rf_rs && rf_rs != 0) ? wb_res : gpr[rf_rs];
  wire [63:0] rf_b = (wb_valid && wb_wr && wb_rd == rf_rt && rf_rt != 0) ? wb_res : gpr[rf_rt];

  always_ff @(posedge clk) begin
    if (rst) begin
      rf_valid <= 1'b0; rf_pc <= '0; rf_ir <= '0;
    end else if (rf_load) begin
      rf_valid <= fb_valid && !redirect;
      rf_pc    <= pc;
      rf_ir    <= fb_ir;
    end
  end

  // --------------------------------------------------------------------
  // EX register
  always_ff @(posedge clk) begin
    if (rst) begin
      ex_valid <= 1'b0; ex_pc <= '0; ex_ir <= '0; ex_a <= '0; ex_b <= '0;
      md_fin <= 1'b0; md_issued <= 1'b0;
    end else begin
      if (md_start) md_issued <= 1'b1;
      if (md_done) begin md_fin <= 1'b1; md_issued <= 1'b0; end
      if (ex_load) begin
        ex_valid <= rf_valid && !nullify;
        ex_pc    <= rf_pc;
        ex_ir    <= rf_ir;
        ex_a     <= rf_a;
        ex_b     <= rf_b;
        md_fin   <= 1'b0;
      end else begin
        ex_a <= fa;       // keep collecting forwarded values while held
        ex_b <= fb;
      end
    end
  end

  // HI/LO, COP0
  always_ff @(posedge clk) begin
    if (rst) begin
      hi <= '0; lo <= '0; count_div <= 1'b0;
      for (int i = 0; i < 32; i++) cp0[i] <= '0;
      cp0[15] <= 64'h0000_0B22;          // PRId
      cp0[16] <= 64'h0006_E463;          // Config
      cp0[12] <= 64'h3400_0000;          // Status
    end else begin
      count_div <= ~count_div;
      if (count_div) cp0[9] <= sx32(cp0[9][31:0] + 32'd1);
      if (md_done) begin hi <= md_hi; lo <= md_lo; end
      if (ex_valid && ex_adv) begin
        if (x_mthi) hi <= fa;
        if (x_mtlo) lo <= fa;
        if (x_mtc0 && rd != 5'd15)
          cp0[rd] <= (rs == 5'd5) ? fb : sx32(fb[31:0]);
      end
    end
  end

  assign cache_op        = ex_valid && ex_adv && x_cache;
  assign cache_op_icache = (rt[1:0] == 2'b00);
  assign cache_op_addr   = phys(x_res);

  // --------------------------------------------------------------------
  // DC register and data access
  always_ff @(posedge clk) begin
    if (rst) begin
      dc_valid <= 1'b0; dc_wr <= 1'b0; dc_load <= 1'b0; dc_store <= 1'b0;
      dc_uns <= 1'b0; dc_size <= LS_W; dc_rd <= '0; dc_res <= '0; dc_sdata <= '0;
    end else if (!stall_dc) begin
      dc_valid <= ex_valid && !ex_busy;
      dc_wr    <= x_wr;
      dc_load  <= x_load;
      dc_store <= x_store;
      dc_uns   <= x_uns;
      dc_size  <= x_size;
      dc_rd    <= x_rd;
      dc_res   <= x_res;
      dc_sdata <= fb;
    end
  end

  wire [2:0]  ba = dc_res[2:0];
  logic [63:0] st_data;
  logic [7:0]  st_be;
  always_comb begin
    logic [3:0]  wbe;
    logic [31:0] wd;
    st_data = dc_sdata; st_be = 8'h00; wbe = '0; wd = '0;
    unique case (dc_size)
      LS_B:  begin st_data = {8{dc_sdata[7:0]}};  st_be = 8'h80 >> ba; end
      LS_H:  begin st_data = {4{dc_sdata[15:0]}}; st_be = 8'hC0 >> {ba[2:1], 1'b0}; end
      LS_W:  begin st_data = {2{dc_sdata[31:0]}}; st_be = ba[2] ? 8'h0F : 8'hF0; end
      LS_D:  begin st_data = dc_sdata;            st_be = 8'hFF; end
      LS_WL: begin
        wd = dc_sdata[31:0] >> (8 * ba[1:0]); wbe = 4'hF >> ba[1:0];
        st_data = {wd, wd}; st_be = ba[2] ? {4'h0, wbe} : {wbe, 4'h0};
      end
      LS_WR: begin
        wd = dc_sdata[31:0] << (8 * (3 - ba[1:0])); wbe = 4'(4'hF << (3 - ba[1:0]));
        st_data = {wd, wd}; st_be = ba[2] ? {4'h0, wbe} : {wbe, 4'h0};
      end
      LS_DL: begin st_data = dc_sdata >> (8 * ba);       st_be = 8'hFF >> ba; end
      LS_DR: begin st_data = dc_sdata << (8 * (7 - ba)); st_be = 8'(8'hFF << (7 - ba)); end
      default: ;
    endcase
  end

  assign d_req.req   = dc_mem;
  assign d_req.we    = dc_store;
  assign d_req.addr  = phys(dc_res);
  assign d_req.wdata = st_data;
  assign d_req.be    = st_be;
  assign d_cached    = (dc_res[31:29] == 3'b100);

  logic [63:0] ld_val;
  always_comb begin
    logic [63:0] dw;
    logic [31:0] w, m;
    logic [63:0] mm;
    logic [7:0]  b8;
    logic [15:0] h;
    dw = d_rsp.rdata;
    b8 = dw[63 - 8*ba -: 8];
    h  = dw[63 - 16*ba[2:1] -: 16];
    w  = ba[2] ? dw[31:0] : dw[63:32];
    m = '0; mm = '0;
    unique case (dc_size)
      LS_B: begin
        ld_val = dc_uns ? {56'd0, b8} : {{56{b8[7]}}, b8};
      end
      LS_H: begin
        ld_val = dc_uns ? {48'd0, h} : {{48{h[15]}}, h};
      end
      LS_W:  ld_val = dc_uns ? {32'd0, w} : sx32(w);
      LS_D:  ld_val = dw;
      LS_WL: begin
        m = (32'd1 << (8 * ba[1:0])) - 32'd1;
        ld_val = sx32((w << (8 * ba[1:0])) | (dc_sdata[31:0] & m));
      end
      LS_WR: begin
        m = 32'hFFFF_FFFF >> (8 * (3 - ba[1:0]));
        ld_val = sx32((w >> (8 * (3 - ba[1:0]))) | (dc_sdata[31:0] & ~m));
      end
      LS_DL: begin
        mm = (64'd1 << (8 * ba)) - 64'd1;
        ld_val = (dw << (8 * ba)) | (dc_sdata & mm);
      end
      LS_DR: begin
        mm = 64'hFFFF_FFFF_FFFF_FFFF >> (8 * (7 - ba));
        ld_val = (dw >> (8 * (7 - ba))) | (dc_sdata & ~mm);
      end
      default: ld_val = dw;
    endcase
  end

  // --------------------------------------------------------------------
  // WB register and register-file write
  always_ff @(posedge clk) begin
    if (rst) begin
      wb_valid <= 1'b0; wb_wr <= 1'b0; wb_rd <= '0; wb_res <= '0;
    end else begin
      wb_valid <= dc_valid && !stall_dc;
      wb_wr    <= dc_wr;
      wb_rd    <= dc_rd;
      wb_res   <= dc_load ? ld_val : dc_res;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 32; i++) gpr[i] <= '0;
    end else if (wb_valid && wb_wr && wb_rd != 0) begin
      gpr[wb_rd] <= wb_res;
    end
  end
  assign dbg_r2 = gpr[2];

  // --------------------------------------------------------------------
  // counters
  always_ff @(posedge clk) begin
    if (rst) begin
      n_retired <= '0; n_fwd <= '0; n_load_use <= '0; n_taken <= '0;
      n_likely_null <= '0; n_md_stall <= '0;
    end else begin
      if (wb_valid) n_retired <= n_retired + 1;
      if (ex_valid && ex_adv && (fwd_a || fwd_b)) n_fwd <= n_fwd + 1;
      if (load_use && !stall_dc) n_load_use <= n_load_use + 1;
      if (redirect) n_taken <= n_taken + 1;
      if (nullify) n_likely_null <= n_likely_null + 1;
      if (md_wait) n_md_stall <= n_md_stall + 1;
    end
  end
endmodule
