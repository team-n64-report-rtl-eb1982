// n64_tb_cellram: behavioural model of the 16 MB cellular RAM in its
// asynchronous (SRAM-like) mode, for testbenches. Evaluated every 1 ns.
// A read drives the addressed halfword only once address and chip enable
// have been stable with oe_n low for 70 ns (tAA); before that it drives the
// inverted word, so an early sample shows up as wrong data. A write is taken
// at the end of the we_n pulse with the data of the last nanosecond, per
// byte by ub_n (dq[15:8]) and lb_n (dq[7:0]); a pulse shorter than 45 ns
// (tWP) or an address change during it counts a timing error. ram_clk must
// stay low and adv_n low in this mode; anything else also counts an error.
// The pins are ignored for the first 100 ns, while the controller is reset.
`timescale 1ns/1ps
module n64_tb_cellram (
  input  logic [22:0] a,
  input  logic [15:0] dq_in,     // from the controller
  input  logic        dq_oe,
  output logic [15:0] dq_out,    // to the controller
  input  logic        ce_n,
  input  logic        oe_n,
  input  logic        we_n,
  input  logic        ub_n,
  input  logic        lb_n,
  input  logic        adv_n,
  input  logic        cre,
  input  logic        clk
);
  logic [15:0] mem [logic [22:0]];
  int timing_errors = 0, n_writes = 0, n_reads = 0;
  logic [22:0] a_p = 0, wa = 0;
  logic ce_p = 1, oe_p = 1;
  int stable_ns = 0, we_ns = 0;
  logic [15:0] wd = 0; logic wub = 1, wlb = 1;

  function automatic logic [15:0] rd(input logic [22:0] x);
    return mem.exists(x) ? mem[x] : 16'h0;
  endfunction
  function automatic void poke(input logic [22:0] x, input logic [15:0] d);
    mem[x] = d;
  endfunction

  initial begin
    dq_out = 16'h0;
    forever begin
      #1;
      if ($realtime < 100.0) begin             // controller still in reset
        we_ns = 0; a_p = a; ce_p = ce_n; oe_p = oe_n;
        continue;
      end
      if (clk || adv_n || cre) timing_errors++;
      if (a != a_p || ce_n != ce_p || oe_n != oe_p) stable_ns = 0; else stable_ns++;
      if (!ce_n && !oe_n) begin
        dq_out = (stable_ns >= 70) ? rd(a) : ~rd(a);
        if (stable_ns == 70) n_reads++;
      end else dq_out = 16'h0;
      if (!ce_n && !we_n) begin
        if (we_ns > 0 && a != wa) timing_errors++;
        if (!dq_oe) timing_errors++;
        wa = a; wd = dq_in; wub = ub_n; wlb = lb_n; we_ns++;
      end else if (we_ns > 0) begin
        logic [15:0] m;
        if (we_ns < 45) timing_errors++;
        m = rd(wa);
        if (!wub) m[15:8] = wd[15:8];
        if (!wlb) m[7:0]  = wd[7:0];
        mem[wa] = m;
        n_writes++;
        we_ns = 0;
      end
      a_p = a; ce_p = ce_n; oe_p = oe_n;
    end
  end
endmodule
