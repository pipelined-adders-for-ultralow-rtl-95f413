// tb_dr_full_adder: for every one of the 8 input combinations the adder is
// precharged (all outputs must be null), then evaluated; one clk after the
// inputs become valid sum and carry must be the dual-rail encoding of
// a ^ b ^ c and majority(a, b, c). The inputs are then returned to null
// with ackpre still high and the outputs must hold (domino hold). The
// combinational outputs must follow the inputs at once and be null while
// precharging.
`timescale 1ns/1ps
module tb_dr_full_adder;
  import dr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #0.2 rst_n = 1'b0;   // reset edge before the first clock edge
  always #1 clk = ~clk;

  logic ackpre;
  dr_bit_t a, b, cin, sum, cout, csum, ccout;
  int checks = 0, failures = 0;

  dr_full_adder dut (.clk(clk), .rst_n(rst_n), .ackpre(ackpre), .a(a), .b(b), .cin(cin),
                     .sum(sum), .cout(cout), .comb_sum(csum), .comb_cout(ccout));

  task automatic expect_bits(input dr_bit_t got_s, got_c, exp_s, exp_c, input string what);
    checks++;
    if (got_s !== exp_s || got_c !== exp_c) begin
      failures++;
      $display("FAIL %s: sum %b%b exp %b%b cout %b%b exp %b%b", what,
               got_s.t, got_s.f, exp_s.t, exp_s.f, got_c.t, got_c.f, exp_c.t, exp_c.f);
    end
  endtask

  initial begin
    a = DR_NULL; b = DR_NULL; cin = DR_NULL; ackpre = 1'b0;
    @(negedge clk); rst_n = 1'b1;
    for (int rep = 0; rep < 4; rep++) begin
      for (int v = 0; v < 8; v++) begin
        logic va, vb, vc; dr_bit_t es, ec;
        {va, vb, vc} = 3'(v);
        es = dr_enc(va ^ vb ^ vc);
        ec = dr_enc((va & vb) | (va & vc) | (vb & vc));
        // precharge with valid inputs present: outputs null
        ackpre = 1'b0; a = dr_enc(va); b = dr_enc(vb); cin = dr_enc(vc);
        @(negedge clk);
        expect_bits(sum, cout, DR_NULL, DR_NULL, "precharge");
        expect_bits(csum, ccout, DR_NULL, DR_NULL, "precharge comb");
        // evaluate
        ackpre = 1'b1;
        #0.1;
        expect_bits(csum, ccout, es, ec, "comb evaluate");
        @(negedge clk);
        expect_bits(sum, cout, es, ec, "evaluate");
        // inputs return to null: domino hold
        a = DR_NULL; b = DR_NULL; cin = DR_NULL;
        repeat (2) @(negedge clk);
        expect_bits(sum, cout, es, ec, "hold");
        // inputs null before evaluation: nothing happens
        ackpre = 1'b0; @(negedge clk); ackpre = 1'b1; @(negedge clk);
        expect_bits(sum, cout, DR_NULL, DR_NULL, "null inputs");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
