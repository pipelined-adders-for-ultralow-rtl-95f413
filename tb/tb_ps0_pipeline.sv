// tb_ps0_pipeline: self-checking test of the PS0 pipelined adder.
//
// A source drives random additions with the four-phase protocol (valid
// while in_ack = 1, null after in_ack falls) and a sink takes results the
// same way, sometimes stalling. Every result is compared with a + b + cin
// computed in the testbench, and the b field must come through unchanged.
// A first run with an eager source and sink measures the steady-state
// token period, which must equal the 3 T_eval + T_pre + 2 T_cd cycle of
// the design with one clk per term (6 clk: the source's and the sink's
// responses overlap with it), and the forward latency: one clk for the
// source register, one per stage, one for the last completion detector.
// It also checks that, with the sink stalling, tokens come to rest in
// alternate stages (stage 1 and stage 3 full, stage 2 empty).
`timescale 1ns/1ps
module tb_ps0_pipeline;
  import dr_pkg::*;

  localparam int unsigned STAGES = 3;
  localparam int unsigned NTOK   = 400;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #0.2 rst_n = 1'b0;   // reset edge before the first clock edge
  always #1 clk = ~clk;

  dr_bit_t [STAGES-1:0] a_in, b_in, sum_out, b_out;
  dr_bit_t c_in, c_out;
  logic in_ack, out_done_n, out_ackpre;

  ps0_pipeline #(.STAGES(STAGES)) dut (
    .clk(clk), .rst_n(rst_n), .a_in(a_in), .b_in(b_in), .c_in(c_in),
    .in_ack(in_ack), .sum_out(sum_out), .b_out(b_out), .c_out(c_out),
    .out_done_n(out_done_n), .out_ackpre(out_ackpre));

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // Expected results, in order.
  logic [STAGES:0] exp_q[$];
  logic [STAGES-1:0] expb_q[$];
  int sent = 0, got = 0;
  int stall_pct = 0;          // sink stall probability in percent
  int idle_pct  = 0;          // source idle probability in percent
  int last_got_cycle = -1, period = -1, period_min = 1 << 30, period_max = 0;
  int send_cycle[$];
  int latency = -1;
  logic src_valid;

  function automatic dr_bit_t [STAGES-1:0] enc(input logic [STAGES-1:0] v);
    dr_bit_t [STAGES-1:0] r;
    for (int i = 0; i < STAGES; i++) r[i] = dr_enc(v[i]);
    return r;
  endfunction

  // Source
  always @(posedge clk) begin
    if (!rst_n) begin
      a_in <= '0; b_in <= '0; c_in <= DR_NULL; src_valid <= 1'b0;
    end else if (src_valid) begin
      if (!in_ack) begin
        a_in <= '0; b_in <= '0; c_in <= DR_NULL; src_valid <= 1'b0;
      end
    end else if (in_ack && sent < NTOK && ($urandom_range(99) >= idle_pct)) begin
      logic [STAGES-1:0] a, b; logic c;
      a = STAGES'($urandom); b = STAGES'($urandom); c = 1'($urandom);
      a_in <= enc(a); b_in <= enc(b); c_in <= dr_enc(c); src_valid <= 1'b1;
      exp_q.push_back({1'b0, a} + {1'b0, b} + (STAGES+1)'(c));
      expb_q.push_back(b);
      send_cycle.push_back(cycle);
      sent++;
    end
  end

  // Sink
  always @(posedge clk) begin
    if (!rst_n) begin
      out_ackpre <= 1'b1;
    end else if (out_ackpre && !out_done_n && ($urandom_range(99) >= stall_pct)) begin
      logic [STAGES:0] r, e; logic [STAGES-1:0] bo; logic ok;
      ok = 1'b1;
      for (int i = 0; i < STAGES; i++) begin
        ok &= dr_is_valid(sum_out[i]) & dr_is_valid(b_out[i]);
        r[i]  = sum_out[i].t;
        bo[i] = b_out[i].t;
      end
      ok &= dr_is_valid(c_out);
      r[STAGES] = c_out.t;
      e = exp_q.pop_front();
      checks++;
      if (!ok || r !== e || bo !== expb_q.pop_front()) begin
        failures++;
        $display("FAIL token %0d: got %b expected %b", got, r, e);
      end
      if (got == 0) latency = cycle - send_cycle[0];
      if (last_got_cycle >= 0) begin
        period = cycle - last_got_cycle;
        if (got > 4 && period < period_min) period_min = period;
        if (got > 4 && period > period_max) period_max = period;
      end
      last_got_cycle = cycle;
      got++;
      out_ackpre <= 1'b0;
    end else if (!out_ackpre && out_done_n) begin
      out_ackpre <= 1'b1;
    end
  end

  // PS0 occupancy: with the sink stalled, stages 1 and 3 hold tokens while
  // stage 2 is empty (detector outputs 0, 1, 0).
  int n_alt = 0;
  always @(posedge clk) if (rst_n && dut.done_n == 3'b010) n_alt++;

  task automatic run_phase(input int n_total);
    while (got < n_total) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Phase 1: eager source and sink, measure period and latency.
    run_phase(50);
    $display("steady period min %0d max %0d, latency %0d", period_min, period_max, latency);
    checks++;
    if (period_min != 6 || period_max != 6) begin
      failures++; $display("FAIL: token period %0d..%0d, expected 6", period_min, period_max);
    end
    checks++;
    if (latency != STAGES + 2) begin
      failures++; $display("FAIL: latency %0d, expected %0d", latency, STAGES + 2);
    end
    // Phase 2: random stalls at both ends.
    stall_pct = 40; idle_pct = 30;
    run_phase(NTOK);
    checks++;
    if (n_alt == 0) begin failures++; $display("FAIL: stages 1 and 3 never held tokens together"); end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
