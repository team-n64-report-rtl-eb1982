// tb_n64_cellram_ctrl: cellular RAM controller against the behavioural RAM
// with its 70 ns access time. Random 64-bit reads and writes with random
// byte enables are compared with a doubleword model; every access must take
// exactly 4*(ACCESS_CYC+1) RAM clocks plus one for the ack (21 cycles from
// the first clock edge that sees the request), and the RAM model must report
// no timing violation.
`timescale 1ns/1ps
module tb_n64_cellram_ctrl;
  logic clk = 0, rst = 1;
  always #10 clk = ~clk;                       // 50 MHz
  logic req = 0, we = 0, ack; logic [23:0] addr = 0; logic [63:0] wdata = 0, rdata; logic [7:0] be = 0;
  logic [22:0] ram_a; logic [15:0] ram_dq_o, ram_dq_i; logic ram_dq_oe, ram_ce_n, ram_oe_n, ram_we_n,
        ram_ub_n, ram_lb_n, ram_adv_n, ram_cre, ram_clk;
  int checks = 0, failures = 0;
  logic [63:0] m [logic [20:0]];

  n64_cellram_ctrl dut (.*);
  n64_tb_cellram ram (.a(ram_a), .dq_in(ram_dq_o), .dq_oe(ram_dq_oe), .dq_out(ram_dq_i), .ce_n(ram_ce_n),
    .oe_n(ram_oe_n), .we_n(ram_we_n), .ub_n(ram_ub_n), .lb_n(ram_lb_n), .adv_n(ram_adv_n),
    .cre(ram_cre), .clk(ram_clk));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  task automatic access(input bit w, input logic [20:0] dw, input logic [63:0] d, input logic [7:0] b);
    int cyc;
    logic [63:0] e;
    e = m.exists(dw) ? m[dw] : 64'h0;
    @(negedge clk);
    @(negedge clk); req = 1; we = w; addr = {dw, 3'b000}; wdata = d; be = b; cyc = 0;
    @(posedge clk); #1; cyc++;
    while (!ack) begin @(posedge clk); #1; cyc++; end
    chk(cyc == 4 * 5 + 1, "access time: 4*(4+1) RAM clocks, then ack");
    if (!w) chk(rdata == e, "read data");
    else begin
      for (int k = 0; k < 8; k++) if (b[7-k]) e[63-8*k -: 8] = d[63-8*k -: 8];
      m[dw] = e;
    end
    req = 0;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [20:0] pool[16];
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 16; i++) pool[i] = 21'($urandom);
    for (int i = 0; i < 16; i++) access(1, pool[i], {$urandom, $urandom}, 8'hFF);
    for (int i = 0; i < 600; i++)
      access($urandom_range(1), pool[$urandom_range(15)], {$urandom, $urandom}, 8'($urandom));
    chk(ram.timing_errors == 0, "no RAM timing violations");
    chk(ram.n_writes > 0 && ram.n_reads > 0, "RAM used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
