// n64_tb_pkg: helpers shared by the testbenches: the SD card image pattern
// and MIPS instruction encoders used to build test programs.
`timescale 1ns/1ps
package n64_tb_pkg;
  // content of the simulated SD card / cartridge image at byte address a
  function automatic logic [7:0] sd_byte(input logic [31:0] a);
    return 8'((a ^ (a >> 8) ^ (a >> 16)) * 13 + 7);
  endfunction

  // ---- instruction encoders ---------------------------------------------
  function automatic logic [31:0] i_t(input logic [5:0] op, input logic [4:0] rs,
                                      input logic [4:0] rt, input logic [15:0] imm);
    return {op, rs, rt, imm};
  endfunction
  function automatic logic [31:0] r_t(input logic [4:0] rs, input logic [4:0] rt,
                                      input logic [4:0] rd, input logic [4:0] sa,
                                      input logic [5:0] fn);
    return {6'd0, rs, rt, rd, sa, fn};
  endfunction
  function automatic logic [31:0] NOP();                    return 32'h0; endfunction
  function automatic logic [31:0] LUI(input int rt, input int imm);   return i_t(6'h0F, 5'd0, 5'(rt), 16'(imm)); endfunction
  function automatic logic [31:0] ORI(input int rt, input int rs, input int imm); return i_t(6'h0D, 5'(rs), 5'(rt), 16'(imm)); endfunction
  function automatic logic [31:0] ADDIU(input int rt, input int rs, input int imm); return i_t(6'h09, 5'(rs), 5'(rt), 16'(imm)); endfunction
  function automatic logic [31:0] DADDIU(input int rt, input int rs, input int imm); return i_t(6'h19, 5'(rs), 5'(rt), 16'(imm)); endfunction
  function automatic logic [31:0] SLTI(input int rt, input int rs, input int imm); return i_t(6'h0A, 5'(rs), 5'(rt), 16'(imm)); endfunction
  function automatic logic [31:0] ANDI(input int rt, input int rs, input int imm); return i_t(6'h0C, 5'(rs), 5'(rt), 16'(imm)); endfunction
  function automatic logic [31:0] XORI(input int rt, input int rs, input int imm); return i_t(6'h0E, 5'(rs), 5'(rt), 16'(imm)); endfunction
  function automatic logic [31:0] LW(input int rt, input int off, input int base);  return i_t(6'h23, 5'(base), 5'(rt), 16'(off)); endfunction
  function automatic logic [31:0] LWU(input int rt, input int off, input int base); return i_t(6'h27, 5'(base), 5'(rt), 16'(off)); endfunction
  function automatic logic [31:0] LB(input int rt, input int off, input int base);  return i_t(6'h20, 5'(base), 5'(rt), 16'(off)); endfunction
  function automatic logic [31:0] LBU(input int rt, input int off, input int base); return i_t(6'h24, 5'(base), 5'(rt), 16'(off)); endfunction
  function automatic logic [31:0] LH(input int rt, input int off, input int base);  return i_t(6'h21, 5'(base), 5'(rt), 16'(off)); endfunction
  function automatic logic [31:0] LHU(input int rt, input int off, input int base); return i_t(6'h25, 5'(base), 5'(rt), 16'(off)); endfunction
  function automatic logic [31:0] LD(input int rt, input int off, input int base);  return i_t(6'h37, 5'(base), 5'(rt), 16'(off)); endfunction
  function automatic logic [31:0] LWL(input int rt, input int off, input int base); return i_t(6'h22, 5'(base), 5'(rt), 16'(off)); endfunction
  function automatic logic [31:0] LWR(input int rt, input int off, input int base); return i_t(6'h26, 5'(base), 5'(rt), 16'(off)); endfunction
  function automatic logic [31:0] SW(input int rt, input int off, input int base);  return i_t(6'h2B, 5'(base), 5'(rt), 16'(off)); endfunction
  function automatic logic [31:0] SB(input int rt, input int off, input int base);  return i_t(6'h28, 5'(base), 5'(rt), 16'(off)); endfunction
  function automatic logic [31:0] SH(input int rt, input int off, input int base);  return i_t(6'h29, 5'(base), 5'(rt), 16'(off)); endfunction
  function automatic logic [31:0] SD(input int rt, input int off, input int base);  return i_t(6'h3F, 5'(base), 5'(rt), 16'(off)); endfunction
  function automatic logic [31:0] SWL(input int rt, input int off, input int base); return i_t(6'h2A, 5'(base), 5'(rt), 16'(off)); endfunction
  function automatic logic [31:0] SWR(input int rt, input int off, input int base); return i_t(6'h2E, 5'(base), 5'(rt), 16'(off)); endfunction
  function automatic logic [31:0] CACHE(input int opc, input int off, input int base); return i_t(6'h2F, 5'(base), 5'(opc), 16'(off)); endfunction
  function automatic logic [31:0] BEQ(input int rs, input int rt, input int off);  return i_t(6'h04, 5'(rs), 5'(rt), 16'(off)); endfunction
  function automatic logic [31:0] BNE(input int rs, input int rt, input int off);  return i_t(6'h05, 5'(rs), 5'(rt), 16'(off)); endfunction
  function automatic logic [31:0] BEQL(input int rs, input int rt, input int off); return i_t(6'h14, 5'(rs), 5'(rt), 16'(off)); endfunction
  function automatic logic [31:0] BNEL(input int rs, input int rt, input int off); return i_t(6'h15, 5'(rs), 5'(rt), 16'(off)); endfunction
  function automatic logic [31:0] BGTZ(input int rs, input int off); return i_t(6'h07, 5'(rs), 5'd0, 16'(off)); endfunction
  function automatic logic [31:0] BLTZ(input int rs, input int off); return i_t(6'h01, 5'(rs), 5'd0, 16'(off)); endfunction
  function automatic logic [31:0] BGEZAL(input int rs, input int off); return i_t(6'h01, 5'(rs), 5'd17, 16'(off)); endfunction
  function automatic logic [31:0] J(input int target);   return {6'h02, 26'(target >> 2)}; endfunction
  function automatic logic [31:0] JAL(input int target); return {6'h03, 26'(target >> 2)}; endfunction
  function automatic logic [31:0] JR(input int rs);      return r_t(5'(rs), 5'd0, 5'd0, 5'd0, 6'h08); endfunction
  function automatic logic [31:0] ADDU(input int rd, input int rs, input int rt) ; return r_t(5'(rs), 5'(rt), 5'(rd), 5'd0, 6'h21); endfunction
  function automatic logic [31:0] SUBU(input int rd, input int rs, input int rt) ; return r_t(5'(rs), 5'(rt), 5'(rd), 5'd0, 6'h23); endfunction
  function automatic logic [31:0] DADDU(input int rd, input int rs, input int rt); return r_t(5'(rs), 5'(rt), 5'(rd), 5'd0, 6'h2D); endfunction
  function automatic logic [31:0] DSUBU(input int rd, input int rs, input int rt); return r_t(5'(rs), 5'(rt), 5'(rd), 5'd0, 6'h2F); endfunction
  function automatic logic [31:0] AND_(input int rd, input int rs, input int rt) ; return r_t(5'(rs), 5'(rt), 5'(rd), 5'd0, 6'h24); endfunction
  function automatic logic [31:0] OR_(input int rd, input int rs, input int rt)  ; return r_t(5'(rs), 5'(rt), 5'(rd), 5'd0, 6'h25); endfunction
  function automatic logic [31:0] XOR_(input int rd, input int rs, input int rt) ; return r_t(5'(rs), 5'(rt), 5'(rd), 5'd0, 6'h26); endfunction
  function automatic logic [31:0] NOR_(input int rd, input int rs, input int rt) ; return r_t(5'(rs), 5'(rt), 5'(rd), 5'd0, 6'h27); endfunction
  function automatic logic [31:0] SLT(input int rd, input int rs, input int rt)  ; return r_t(5'(rs), 5'(rt), 5'(rd), 5'd0, 6'h2A); endfunction
  function automatic logic [31:0] SLTU(input int rd, input int rs, input int rt) ; return r_t(5'(rs), 5'(rt), 5'(rd), 5'd0, 6'h2B); endfunction
  function automatic logic [31:0] SLL(input int rd, input int rt, input int sa)  ; return r_t(5'd0, 5'(rt), 5'(rd), 5'(sa), 6'h00); endfunction
  function automatic logic [31:0] SRA(input int rd, input int rt, input int sa)  ; return r_t(5'd0, 5'(rt), 5'(rd), 5'(sa), 6'h03); endfunction
  function automatic logic [31:0] DSLL32(input int rd, input int rt, input int sa); return r_t(5'd0, 5'(rt), 5'(rd), 5'(sa), 6'h3C); endfunction
  function automatic logic [31:0] DSRA(input int rd, input int rt, input int sa) ; return r_t(5'd0, 5'(rt), 5'(rd), 5'(sa), 6'h3B); endfunction
  function automatic logic [31:0] MULT(input int rs, input int rt)  ; return r_t(5'(rs), 5'(rt), 5'd0, 5'd0, 6'h18); endfunction
  function automatic logic [31:0] DMULTU(input int rs, input int rt); return r_t(5'(rs), 5'(rt), 5'd0, 5'd0, 6'h1D); endfunction
  function automatic logic [31:0] DIV(input int rs, input int rt)   ; return r_t(5'(rs), 5'(rt), 5'd0, 5'd0, 6'h1A); endfunction
  function automatic logic [31:0] DDIVU(input int rs, input int rt) ; return r_t(5'(rs), 5'(rt), 5'd0, 5'd0, 6'h1F); endfunction
  function automatic logic [31:0] MFHI(input int rd); return r_t(5'd0, 5'd0, 5'(rd), 5'd0, 6'h10); endfunction
  function automatic logic [31:0] MFLO(input int rd); return r_t(5'd0, 5'd0, 5'(rd), 5'd0, 6'h12); endfunction
  function automatic logic [31:0] MTC0(input int rt, input int rd); return {6'h10, 5'd4, 5'(rt), 5'(rd), 11'd0}; endfunction
  function automatic logic [31:0] MFC0(input int rt, input int rd); return {6'h10, 5'd0, 5'(rt), 5'(rd), 11'd0}; endfunction
endpackage
