// tb_n64_cpu: runs a test program on the five-stage CPU. Instructions are
// answered in the same cycle (as by an instruction-cache hit) from a
// behavioural memory that also serves the data port with random latency. The program starts at the reset vector 0xBFC00000 (uncached) and
// exercises ALU forwarding from both later stages, a load-use stall, a
// counted loop with a taken branch and delay slot, a branch-likely whose
// delay slot is cancelled, MULT and DIV with HI/LO reads, JAL/JR, 64-bit
// shifts and adds, byte/halfword loads and stores, LWL/LWR and SD. Each
// result is stored to memory and compared with the value worked out here;
// the CPU's event counters must show every mechanism, with exact counts
// where the program fixes them.
`timescale 1ns/1ps
module tb_n64_cpu;
  import n64_pkg::*;
  import n64_tb_pkg::*;
  logic clk = 0, rst = 1;
  always #10 clk = ~clk;
  mem_req_t i_req, d_req, m_req; mem_rsp_t i_rsp, d_rsp, m_rsp;
  logic i_cached, d_cached, cache_op, cache_op_icache; logic [31:0] cache_op_addr;
  logic [31:0] n_retired, n_fwd, n_load_use, n_taken, n_likely_null, n_md_stall;
  logic [63:0] dbg_r2;
  int checks = 0, failures = 0;

  n64_cpu dut (.*);
  n64_tb_mem #(.MAX_LAT(2)) mem (.clk, .req(d_req), .rsp(d_rsp));
  // instruction port: answered in the same cycle, like an instruction cache
  // hit, so that back-to-back dependences reach the pipeline
  always_comb begin
    i_rsp.ack   = i_req.req;
    i_rsp.rdata = mem.peek(i_req.addr);
  end
  assign m_req = '0;
  assign m_rsp = '0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  logic [31:0] prog [128];
  int pc = 0;
  function automatic void emit(input logic [31:0] w); prog[pc] = w; pc++; endfunction

  function automatic logic [31:0] rd32(input logic [31:0] a);
    logic [63:0] d;
    d = mem.peek(a);
    return a[2] ? d[31:0] : d[63:32];
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 128; i++) prog[i] = 32'h0;
    emit(LUI(1, 16'hA000));          // 0  r1 = 0xA0000000
    emit(ORI(1, 1, 16'h1000));       // 1  forwarded from DC stage
    emit(ADDIU(2, 0, 5));            // 2
    emit(ADDIU(3, 0, 7));            // 3
    emit(ADDU(4, 2, 3));             // 4  r2 from WB, r3 from DC: 12
    emit(SW(4, 0, 1));               // 5
    emit(LW(5, 0, 1));               // 6
    emit(ADDIU(5, 5, 1));            // 7  load-use: 13
    emit(SW(5, 4, 1));               // 8
    emit(ADDIU(6, 0, 0));            // 9  sum
    emit(ADDIU(7, 0, 10));           // 10 i
    emit(ADDU(6, 6, 7));             // 11 loop:
    emit(ADDIU(7, 7, -1));           // 12
    emit(BNE(7, 0, -3));             // 13 -> 11
    emit(NOP());                     // 14 delay slot
    emit(SW(6, 8, 1));               // 15 55
    emit(ADDIU(8, 0, 1));            // 16
    emit(BEQL(0, 8, 2));             // 17 not taken: slot cancelled
    emit(ADDIU(8, 0, 99));           // 18 must not execute
    emit(SW(8, 12, 1));              // 19 1
    emit(ADDIU(9, 0, 1234));         // 20
    emit(ADDIU(10, 0, -56));         // 21
    emit(MULT(9, 10));               // 22
    emit(MFLO(11));                  // 23 -69104
    emit(SW(11, 16, 1));             // 24
    emit(ADDIU(12, 0, 1000));        // 25
    emit(ADDIU(13, 0, 7));           // 26
    emit(DIV(12, 13));               // 27
    emit(MFLO(14));                  // 28 142, waits for the divider
    emit(MFHI(15));                  // 29 6
    emit(SW(14, 20, 1));             // 30
    emit(SW(15, 24, 1));             // 31
    emit(JAL(32'h0FC0_0000 + 100 * 4)); // 32 call sub
    emit(NOP());                     // 33
    emit(SW(16, 28, 1));             // 34 77
    emit(ADDIU(17, 0, -2));          // 35
    emit(SH(17, 32, 1));             // 36 bytes 32,33 = FF FE
    emit(LHU(18, 32, 1));            // 37 0xFFFE
    emit(LB(19, 33, 1));             // 38 -2
    emit(SW(18, 36, 1));             // 39
    emit(SW(19, 40, 1));             // 40
    emit(LUI(20, 16'h1122));         // 41
    emit(ORI(20, 20, 16'h3344));     // 42
    emit(SW(20, 44, 1));             // 43
    emit(LUI(20, 16'h5566));         // 44
    emit(ORI(20, 20, 16'h7788));     // 45
    emit(SW(20, 48, 1));             // 46
    emit(ADDIU(20, 0, 0));           // 47
    emit(LWL(20, 46, 1));            // 48 unaligned word at 46: 33 44 55 66
    emit(LWR(20, 49, 1));            // 49
    emit(SW(20, 52, 1));             // 50
    emit(LUI(21, 16'h1234));         // 51
    emit(DSLL32(21, 21, 0));         // 52 0x1234_0000_0000_0000
    emit(DADDIU(21, 21, 5));         // 53
    emit(SD(21, 64, 1));             // 54
    emit(ADDIU(22, 0, 16'h0D0E));    // 55
    emit(SW(22, 60, 1));             // 56 end marker
    emit(BEQ(0, 0, -1));             // 57 spin
    emit(NOP());                     // 58
    pc = 100;
    emit(ADDIU(16, 0, 77));          // 100 sub
    emit(JR(31));                    // 101
    emit(NOP());                     // 102
    for (int i = 0; i < 128; i += 2) mem.poke(32'h1FC0_0000 + 32'(4 * i), {prog[i], prog[i+1]});

    repeat (3) @(posedge clk);
    rst <= 0;
    while (rd32(32'h103C) != 32'h0D0E) @(posedge clk);
    chk(rd32(32'h1000) == 32'd12, "ADDU with forwarding");
    chk(rd32(32'h1004) == 32'd13, "load-use");
    chk(rd32(32'h1008) == 32'd55, "loop sum");
    chk(rd32(32'h100C) == 32'd1, "branch-likely slot cancelled");
    chk(rd32(32'h1010) == 32'(-69104), "MULT");
    chk(rd32(32'h1014) == 32'd142, "DIV quotient");
    chk(rd32(32'h1018) == 32'd6, "DIV remainder");
    chk(rd32(32'h101C) == 32'd77, "JAL/JR");
    chk(rd32(32'h1020) == 32'hFFFE_0000 || rd32(32'h1020)[31:16] == 16'hFFFE, "SH");
    chk(rd32(32'h1024) == 32'h0000_FFFE, "LHU");
    chk(rd32(32'h1028) == 32'hFFFF_FFFE, "LB");
    chk(rd32(32'h1034) == 32'h3344_5566, "LWL/LWR");
    chk(mem.peek(32'h1040) == 64'h1234_0000_0000_0005, "64-bit ops and SD");
    chk(dbg_r2 == 64'd5, "r2");
    chk(n_fwd >= 3, "forwarding happened");
    chk(n_load_use >= 1, "load-use stall happened");
    chk(n_taken >= 9 + 2, "taken branches and jumps");
    chk(n_likely_null == 1, "one branch-likely slot cancelled");
    chk(n_md_stall > 0, "divide stall");
    $display("retired=%0d fwd=%0d load_use=%0d taken=%0d likely=%0d md_stall=%0d",
             n_retired, n_fwd, n_load_use, n_taken, n_likely_null, n_md_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
