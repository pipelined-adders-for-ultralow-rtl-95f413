// tb_serial_adder: adds random 16-bit operands bit-serially, LSB first, one
// bit pair per clock edge (both edges), and compares every sum bit and the
// final carry with the sum computed in the testbench. A W-bit word must
// take exactly W clock edges. A first pass walks all 8 combinations of
// a, b and the stored carry, as in the adder's characterisation pattern.
`timescale 1ns/1ps
module tb_serial_adder;
  import dr_pkg::*;
  localparam int W = 16;

  logic clk = 1'b0, rst_n = 1'b0, ackpre = 1'b1, carry_q;
  dr_bit_t a, b, sum, cout;
  int checks = 0, failures = 0;
  int edges = 0;

  serial_adder dut (.clk(clk), .rst_n(rst_n), .ackpre(ackpre), .a(a), .b(b),
                    .sum(sum), .cout(cout), .carry_q(carry_q));

  // One edge every 1 ns; data is set up halfway between edges.
  task automatic step_edge();
    #0.5 clk = ~clk; edges++; #0.5;
  endtask

  task automatic add_word(input logic [W-1:0] x, y);
    logic [W:0] ref_sum; int e0;
    ref_sum = {1'b0, x} + {1'b0, y};
    e0 = edges;
    for (int i = 0; i < W; i++) begin
      a = dr_enc(x[i]); b = dr_enc(y[i]);
      #0.1;
      checks++;
      if (sum !== dr_enc(ref_sum[i])) begin
        failures++; $display("FAIL bit %0d of %h+%h: sum %b%b", i, x, y, sum.t, sum.f);
      end
      step_edge();
    end
    checks++;
    if (carry_q !== ref_sum[W]) begin failures++; $display("FAIL carry of %h+%h", x, y); end
    checks++;
    if (edges - e0 != W) begin failures++; $display("FAIL: %0d edges for %0d bits", edges - e0, W); end
  endtask

  initial begin
    a = dr_enc(1'b0); b = dr_enc(1'b0);
    #0.3 rst_n = 1'b1; #0.2;
    // All combinations of a, b and carry-in: carry-in comes from the flip-flop.
    for (int v = 0; v < 8; v++) begin
      logic va, vb, vc;
      {va, vb, vc} = 3'(v);
      // load the wanted carry: 1+1 sets it, 0+0 clears it
      a = dr_enc(vc); b = dr_enc(vc); #0.1; step_edge();
      a = dr_enc(va); b = dr_enc(vb); #0.1;
      checks++;
      if (carry_q !== vc || sum !== dr_enc(va ^ vb ^ vc)
          || cout !== dr_enc((va & vb) | (va & vc) | (vb & vc))) begin
        failures++; $display("FAIL combination %b", 3'(v));
      end
      step_edge();
    end
    // Clear the carry, then random words back to back.
    a = dr_enc(1'b0); b = dr_enc(1'b0); step_edge();
    for (int k = 0; k < 200; k++) begin
      logic [W-1:0] x, y;
      x = W'($urandom); y = W'($urandom);
      if (k % 7 == 0) y = ~x;           // long carry chains
      if (k % 11 == 0) y = W'(-x);      // carry out of every bit
      add_word(x, y);
      a = dr_enc(1'b0); b = dr_enc(1'b0); step_edge();   // flush the carry
    end
    // Precharge: outputs go null and the carry is cleared at the next edge.
    a = dr_enc(1'b1); b = dr_enc(1'b1); step_edge();
    ackpre = 1'b0; #0.1;
    checks++;
    if (sum !== DR_NULL || cout !== DR_NULL) begin failures++; $display("FAIL precharge"); end
    step_edge();
    checks++;
    if (carry_q !== 1'b0) begin failures++; $display("FAIL precharge carry"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
