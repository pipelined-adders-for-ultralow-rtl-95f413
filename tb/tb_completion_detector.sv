// tb_completion_detector: drives random dual-rail words (complete, empty or
// mixed) into a 5-bit detector and checks done_n one clk later against a
// model: 0 once all bits are valid, 1 once all are null, else unchanged.
`timescale 1ns/1ps
module tb_completion_detector;
  import dr_pkg::*;
  localparam int W = 5;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #0.2 rst_n = 1'b0;   // reset edge before the first clock edge
  always #1 clk = ~clk;

  dr_bit_t [W-1:0] data;
  logic done_n, model;
  int checks = 0, failures = 0;

  completion_detector #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .data(data), .done_n(done_n));

  initial begin
    data = '0;
    @(negedge clk);
    checks++; if (done_n !== 1'b1) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1; model = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      int kind; logic all_v, all_n;
      kind = $urandom_range(2);
      for (int j = 0; j < W; j++) begin
        if (kind == 0)      data[j] = dr_enc(1'($urandom));
        else if (kind == 1) data[j] = DR_NULL;
        else                data[j] = ($urandom_range(1) == 1) ? dr_enc(1'($urandom)) : DR_NULL;
      end
      all_v = 1'b1; all_n = 1'b1;
      for (int j = 0; j < W; j++) begin
        all_v &= data[j].t ^ data[j].f;
        all_n &= ~(data[j].t | data[j].f);
      end
      if (all_v) model = 1'b0; else if (all_n) model = 1'b1;
      @(negedge clk);
      checks++;
      if (done_n !== model) begin failures++; $display("FAIL step %0d", i); end
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
