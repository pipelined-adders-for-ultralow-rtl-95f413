// tb_c_element: checks the C-element against a reference model: with random
// inputs, z must become 1 one clk after all inputs are 1, 0 one clk after
// all are 0, and otherwise keep its value. Both a 2-input and a 4-input
// instance are tested, including the reset value.
`timescale 1ns/1ps
module tb_c_element;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #0.2 rst_n = 1'b0;   // reset edge before the first clock edge
  always #1 clk = ~clk;

  logic [1:0] in2; logic [3:0] in4;
  logic z2, z4, m2, m4;
  int checks = 0, failures = 0;

  c_element #(.N(2), .RESET_VAL(1'b0)) u2 (.clk(clk), .rst_n(rst_n), .in(in2), .z(z2));
  c_element #(.N(4), .RESET_VAL(1'b1)) u4 (.clk(clk), .rst_n(rst_n), .in(in4), .z(z4));

  initial begin
    in2 = '0; in4 = '0;
    @(negedge clk);
    checks++; if (z2 !== 1'b0 || z4 !== 1'b1) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1; m2 = 1'b0; m4 = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      in2 = 2'($urandom);
      in4 = ($urandom_range(3) == 0) ? '1 : ($urandom_range(3) == 0) ? '0 : 4'($urandom);
      if (&in2) m2 = 1'b1; else if (~|in2) m2 = 1'b0;
      if (&in4) m4 = 1'b1; else if (~|in4) m4 = 1'b0;
      @(negedge clk);
      checks++;
      if (z2 !== m2 || z4 !== m4) begin
        failures++; $display("FAIL step %0d: z2 %b/%b z4 %b/%b", i, z2, m2, z4, m4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
