// tb_ps0_stage: drives one stage (N = 3, bit 1) through its PS0 cycle for
// random tokens: evaluate (outputs valid one clk after the inputs, with bit 1
// of the a field replaced by the sum and c by the carry, everything else
// copied), completion (acknxt falls one clk later), hold (inputs return to
// null, outputs keep the token), precharge (ackpre low: outputs null, then
// acknxt rises) and no evaluation while ackpre is low.
`timescale 1ns/1ps
module tb_ps0_stage;
  import dr_pkg::*;
  localparam int N = 3, BIT = 1;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #0.2 rst_n = 1'b0;   // reset edge before the first clock edge
  always #1 clk = ~clk;

  logic ackpre, acknxt;
  dr_bit_t [N-1:0] a_in, b_in, a_out, b_out;
  dr_bit_t c_in, c_out;
  int checks = 0, failures = 0;

  ps0_stage #(.N(N), .BIT(BIT)) dut (.clk(clk), .rst_n(rst_n), .ackpre(ackpre),
    .a_in(a_in), .b_in(b_in), .c_in(c_in), .a_out(a_out), .b_out(b_out),
    .c_out(c_out), .acknxt(acknxt));

  function automatic dr_bit_t [N-1:0] enc(input logic [N-1:0] v);
    dr_bit_t [N-1:0] r;
    for (int i = 0; i < N; i++) r[i] = dr_enc(v[i]);
    return r;
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    a_in = '0; b_in = '0; c_in = DR_NULL; ackpre = 1'b1;
    @(negedge clk); rst_n = 1'b1;
    check(acknxt === 1'b1 && a_out === '0 && c_out === DR_NULL, "reset state");
    for (int k = 0; k < 300; k++) begin
      logic [N-1:0] a, b, ea; logic c, s, co;
      a = N'($urandom); b = N'($urandom); c = 1'($urandom);
      s  = a[BIT] ^ b[BIT] ^ c;
      co = (a[BIT] & b[BIT]) | (a[BIT] & c) | (b[BIT] & c);
      ea = a; ea[BIT] = s;
      a_in = enc(a); b_in = enc(b); c_in = dr_enc(c);
      @(negedge clk);
      check(a_out === enc(ea) && b_out === enc(b) && c_out === dr_enc(co), "evaluate");
      check(acknxt === 1'b1, "acknxt before detection");
      @(negedge clk);
      check(acknxt === 1'b0, "acknxt after evaluation");
      a_in = '0; b_in = '0; c_in = DR_NULL;
      repeat (2) @(negedge clk);
      check(a_out === enc(ea) && b_out === enc(b) && c_out === dr_enc(co) && acknxt === 1'b0, "hold");
      // precharge while a new token waits at the inputs: no evaluation
      ackpre = 1'b0;
      a_in = enc(~a); b_in = enc(b); c_in = dr_enc(c);
      @(negedge clk);
      check(a_out === '0 && b_out === '0 && c_out === DR_NULL, "precharge");
      @(negedge clk);
      check(acknxt === 1'b1, "acknxt after precharge");
      a_in = '0; b_in = '0; c_in = DR_NULL;
      @(negedge clk);
      ackpre = 1'b1;
      @(negedge clk);
      check(a_out === '0 && acknxt === 1'b1, "idle evaluate with null inputs");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
