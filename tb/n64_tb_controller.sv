// n64_tb_controller: behavioural N64 controller for testbenches. Watches the
// shared single-wire line, decodes a command byte (each bit sampled 2 us
// after its falling edge) and its stop bit, then after 2 us answers: Poll
// (0x01) with the 32-bit button word, Identify (0x00) and Reset (0xFF) with
// the 24-bit identity 0x050001. Answer bits use the same 4 us encoding.
// oe = 1 pulls the line low. While 'present' is 0 it never answers.
`timescale 1ns/1ps
module n64_tb_controller #(
  parameter logic [31:0] BUTTONS = 32'h8040_12F3,
  parameter int          US_NS   = 1000
) (
  input  logic line,
  input  logic present,
  output logic oe
);
  int n_cmds = 0;
  logic [7:0] last_cmd = 0;

  task automatic send_bit(input bit b);
    oe = 1'b1; #(US_NS);
    oe = !b;   #(2 * US_NS);
    oe = 1'b0; #(US_NS);
  endtask

  initial begin
    logic [7:0] c;
    oe = 1'b0;
    forever begin
      for (int i = 7; i >= 0; i--) begin
        @(negedge line);
        #(2 * US_NS);
        c[i] = line;
        if (!line) @(posedge line);
      end
      @(negedge line);                     // stop bit
      @(posedge line);
      #(2 * US_NS);
      last_cmd = c;
      n_cmds++;
      if (present) begin
        if (c == 8'h01) for (int i = 31; i >= 0; i--) send_bit(BUTTONS[i]);
        else if (c == 8'h00 || c == 8'hFF) for (int i = 23; i >= 0; i--) send_bit(24'h050001 >> i);
        if (c == 8'h00 || c == 8'h01 || c == 8'hFF) begin
          oe = 1'b1; #(US_NS); oe = 1'b0; #(2 * US_NS);   // stop bit
        end
      end
    end
  end
endmodule
