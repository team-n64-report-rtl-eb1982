// n64_muldiv: multiply/divide unit for the CPU's HI/LO instructions
// (MULT, MULTU, DIV, DIVU, DMULT, DMULTU, DDIV, DDIVU).
//
// start begins an operation on a and b; done pulses when hi/lo are valid and
// they stay valid until the next start. Multiplies take one cycle after
// start; divides run a restoring shift-subtract loop of 64 steps on the
// operand magnitudes and then fix the signs (quotient truncated towards
// zero, remainder with the dividend's sign). 32-bit forms use the low words
// of a and b and sign-extend their 32-bit results into hi and lo. A zero
// divisor gives an all-ones quotient magnitude and the dividend as remainder.
// The report used pipelined vendor cores and stalled the execute stage while
// they ran; this unit keeps that contract (start, wait, done) with its own
// arithmetic.
`timescale 1ns/1ps
module n64_muldiv (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [2:0]  op,      // {dbl, div, unsigned}
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic        busy,
  output logic        done,
  output logic [63:0] hi,
  output logic [63:0] lo
);
  logic        dbl;
  logic [63:0] d_mag, q, r;
  logic        q_neg, r_neg;
  logic [6:0]  step;
  logic        running;

  function automatic logic [63:0] sx32(input logic [31:0] x);
    return {{32{x[31]}}, x};
  endfunction

  // operand views
  wire [63:0] a_op = start ? a : '0;
  logic [127:0] prod;
  always_comb begin
    logic [63:0] ea, eb;
    if (op[2]) begin ea = a; eb = b; end
    else if (op[0]) begin ea = {32'd0, a[31:0]}; eb = {32'd0, b[31:0]}; end
    else begin ea = sx32(a[31:0]); eb = sx32(b[31:0]); end
    if (op[0]) prod = {64'd0, ea} * {64'd0, eb};
    else       prod = 128'($signed({{64{ea[63]}}, ea}) * $signed({{64{eb[63]}}, eb}));
  end

  assign busy = running;
  wire [64:0] trial = {r, q[63]} - {1'b0, d_mag};

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst) begin
      running <= 1'b0; hi <= '0; lo <= '0; step <= '0; q <= '0; r <= '0;
      d_mag <= '0; q_neg <= 1'b0; r_neg <= 1'b0;
      dbl <= 1'b0;
    end else if (start && !running) begin
      dbl <= op[2];
      if (!op[1]) begin
        if (op[2]) begin hi <= prod[127:64]; lo <= prod[63:0]; end
        else begin hi <= sx32(prod[63:32]); lo <= sx32(prod[31:0]); end
        done <= 1'b1;
      end else begin
        logic [63:0] ea, eb;
        if (op[2]) begin ea = a_op; eb = b; end
        else if (op[0]) begin ea = {32'd0, a_op[31:0]}; eb = {32'd0, b[31:0]}; end
        else begin ea = sx32(a_op[31:0]); eb = sx32(b[31:0]); end
        q_neg <= !op[0] && (ea[63] ^ eb[63]) && (eb != 0);
        r_neg <= !op[0] && ea[63];
        d_mag <= (!op[0] && eb[63]) ? -eb : eb;
        q <= (!op[0] && ea[63]) ? -ea : ea;   // shifted out as the quotient fills in
        r <= '0;
        step <= '0;
        running <= 1'b1;
      end
    end else if (running) begin
      if (step != 7'd64) begin
        if (!trial[64]) begin r <= trial[63:0]; q <= {q[62:0], 1'b1}; end
        else            begin r <= {r[62:0], q[63]}; q <= {q[62:0], 1'b0}; end
        step <= step + 7'd1;
      end else begin
        logic [63:0] qq, rr;
        qq = q_neg ? -q : q;
        rr = r_neg ? -r : r;
        if (dbl) begin lo <= qq; hi <= rr; end
        else     begin lo <= sx32(qq[31:0]); hi <= sx32(rr[31:0]); end
        running <= 1'b0;
        done <= 1'b1;
      end
    end
  end
endmodule
