// tb_det_dff: random data is changed halfway between clock edges; after
// every rising and every falling edge Q must equal the D sampled at that
// edge and Q' its complement. Reset must clear Q.
`timescale 1ns/1ps
module tb_det_dff;
  logic clk = 1'b0, rst_n = 1'b1, d = 1'b0, q, q_n;
  int checks = 0, failures = 0;
  int rise_caps = 0, fall_caps = 0;

  det_dff dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q), .q_n(q_n));

  initial begin
    logic exp_q;
    d = 1'b1;
    #0.5 rst_n = 1'b0;
    #0.5;
    checks++; if (q !== 1'b0 || q_n !== 1'b1) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      d = 1'($urandom);
      #1;
      exp_q = d;
      clk = ~clk;
      #0.5;
      d = 1'($urandom);   // change D after the edge: Q must not follow
      #0.5;
      checks++;
      if (q !== exp_q || q_n !== ~exp_q) begin
        failures++; $display("FAIL edge %0d (%s): q %b exp %b", i, clk ? "rise" : "fall", q, exp_q);
      end
      if (clk) rise_caps++; else fall_caps++;
    end
    checks++;
    if (rise_caps == 0 || fall_caps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
