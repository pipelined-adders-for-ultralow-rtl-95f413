// tb_adder_top: end-to-end test of the whole design at its default size.
//
// Pipelined adder: a four-phase source and sink exchange 600 random
// additions with it, first eagerly (token period must be the 6 clk PS0
// cycle), then with random source idling and sink stalls. Every result is
// checked against a + b + cin. The test counts how often each mechanism
// occurred and fails if one never did: sink stall (result held valid while
// the sink waits), source back-pressure (token ready while stage 1 is busy),
// two or more tokens in flight, carry rippling through every stage, carry
// out, tokens resting in alternate stages (1 and 3 full, 2 empty) and
// precharge cycles of the first and last stages.
//
// Serial adder, run at the same time on its own clock: random 16-bit words
// LSB first, one bit per edge, every sum bit and the final carry checked;
// it counts carries stored on rising and on falling edges and one
// precharge, which must clear the stored carry.
`timescale 1ns/1ps
module tb_adder_top;
  import dr_pkg::*;
  localparam int unsigned STAGES = 3;   // the top's default
  localparam int unsigned NTOK   = 600;
  localparam int          SW     = 16;

  logic p_clk = 1'b0, p_rst_n = 1'b1;
  initial #0.2 p_rst_n = 1'b0;   // reset edge before the first clock edge
  always #1 p_clk = ~p_clk;
  logic s_clk = 1'b0, s_rst_n = 1'b0, s_ackpre = 1'b1, s_carry_q;

  dr_bit_t [STAGES-1:0] p_a, p_b, p_sum, p_b_out;
  dr_bit_t p_cin, p_cout, s_a, s_b, s_sum, s_cout;
  logic p_acknxt, p_done_n, p_ackpre;

  adder_top dut (
    .p_clk(p_clk), .p_rst_n(p_rst_n), .p_a(p_a), .p_b(p_b), .p_cin(p_cin),
    .p_acknxt(p_acknxt), .p_sum(p_sum), .p_b_out(p_b_out), .p_cout(p_cout),
    .p_done_n(p_done_n), .p_ackpre(p_ackpre),
    .s_clk(s_clk), .s_rst_n(s_rst_n), .s_ackpre(s_ackpre), .s_a(s_a), .s_b(s_b),
    .s_sum(s_sum), .s_cout(s_cout), .s_carry_q(s_carry_q));

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge p_clk) cycle <= cycle + 1;

  // mechanism counters
  int n_sink_stall = 0, n_src_wait = 0, n_inflight2 = 0, n_full_ripple = 0;
  int n_alternate = 0;
  int n_carry_out = 0, n_pre_first = 0, n_pre_last = 0;
  int n_rise_carry = 0, n_fall_carry = 0, n_s_precharge = 0, n_words = 0;

  function automatic dr_bit_t [STAGES-1:0] enc(input logic [STAGES-1:0] v);
    dr_bit_t [STAGES-1:0] r;
    for (int i = 0; i < STAGES; i++) r[i] = dr_enc(v[i]);
    return r;
  endfunction

  // ---------------- pipelined adder ----------------
  logic [STAGES:0]   exp_q[$];
  logic [STAGES-1:0] expb_q[$];
  int sent = 0, got = 0, stall_pct = 0, idle_pct = 0;
  int last_got = -1, pmin = 1 << 30, pmax = 0;
  logic src_valid, prev_acknxt, prev_ackpre;

  always @(posedge p_clk) begin
    if (!p_rst_n) begin
      p_a <= '0; p_b <= '0; p_cin <= DR_NULL; src_valid <= 1'b0;
    end else if (src_valid) begin
      if (!p_acknxt) begin
        p_a <= '0; p_b <= '0; p_cin <= DR_NULL; src_valid <= 1'b0;
      end
    end else if (sent < NTOK && ($urandom_range(99) >= idle_pct)) begin
      if (!p_acknxt) n_src_wait++;
      else begin
        logic [STAGES-1:0] a, b; logic c; logic [STAGES:0] carries;
        a = STAGES'($urandom); b = STAGES'($urandom); c = 1'($urandom);
        p_a <= enc(a); p_b <= enc(b); p_cin <= dr_enc(c); src_valid <= 1'b1;
        exp_q.push_back({1'b0, a} + {1'b0, b} + (STAGES+1)'(c));
        expb_q.push_back(b);
        // carry into every stage after the first
        carries[0] = c;
        for (int i = 0; i < STAGES; i++)
          carries[i+1] = (a[i] & b[i]) | (a[i] & carries[i]) | (b[i] & carries[i]);
        if (&carries[STAGES-1:1]) n_full_ripple++;
        sent++;
      end
    end
  end

  always @(posedge p_clk) begin
    if (!p_rst_n) begin
      p_ackpre <= 1'b1;
    end else if (p_ackpre && !p_done_n) begin
      if ($urandom_range(99) < stall_pct) n_sink_stall++;
      else begin
        logic [STAGES:0] r, e; logic [STAGES-1:0] bo; logic ok;
        ok = dr_is_valid(p_cout);
        for (int i = 0; i < STAGES; i++) begin
          ok &= dr_is_valid(p_sum[i]) & dr_is_valid(p_b_out[i]);
          r[i] = p_sum[i].t; bo[i] = p_b_out[i].t;
        end
        r[STAGES] = p_cout.t;
        e = exp_q.pop_front();
        checks++;
        if (!ok || r !== e || bo !== expb_q.pop_front()) begin
          failures++; $display("FAIL token %0d: got %b expected %b", got, r, e);
        end
        if (r[STAGES]) n_carry_out++;
        if (stall_pct == 0 && last_got >= 0 && got > 4) begin
          if (cycle - last_got < pmin) pmin = cycle - last_got;
          if (cycle - last_got > pmax) pmax = cycle - last_got;
        end
        last_got = cycle;
        got++;
        p_ackpre <= 1'b0;
      end
    end else if (!p_ackpre && p_done_n) begin
      p_ackpre <= 1'b1;
    end
  end

  // Observation of the handshake wires only.
  always @(posedge p_clk) begin
    prev_acknxt <= p_acknxt;
    prev_ackpre <= p_ackpre;
    if (p_rst_n) begin
      if (prev_acknxt === 1'b0 && p_acknxt === 1'b1) n_pre_first++;
      if (prev_ackpre === 1'b1 && p_ackpre === 1'b0) n_pre_last++;
      if (sent - got >= 2) n_inflight2++;
      if (dut.u_pipe.done_n == 3'b010) n_alternate++;
    end
  end

  // ---------------- serial adder ----------------
  task automatic s_edge();
    #0.5 s_clk = ~s_clk;
    #0.5;
    if (s_carry_q) begin
      if (s_clk) n_rise_carry++; else n_fall_carry++;
    end
  endtask

  initial begin : serial_side
    s_a = dr_enc(1'b0); s_b = dr_enc(1'b0);
    #0.3 s_rst_n = 1'b1; #0.2;
    for (int k = 0; k < 300; k++) begin
      logic [SW-1:0] x, y; logic [SW:0] ref_sum;
      x = SW'($urandom); y = SW'($urandom);
      if (k % 5 == 0) y = SW'(-x);
      ref_sum = {1'b0, x} + {1'b0, y};
      for (int i = 0; i < SW; i++) begin
        s_a = dr_enc(x[i]); s_b = dr_enc(y[i]);
        #0.1;
        checks++;
        if (s_sum !== dr_enc(ref_sum[i])) begin failures++; $display("FAIL serial bit %0d", i); end
        s_edge();
      end
      checks++;
      if (s_carry_q !== ref_sum[SW]) begin failures++; $display("FAIL serial carry"); end
      n_words++;
      if (k % 50 == 49 && s_carry_q) begin
        // precharge clears the stored carry
        s_ackpre = 1'b0; s_edge(); s_ackpre = 1'b1;
        checks++;
        if (s_carry_q !== 1'b0) begin failures++; $display("FAIL serial precharge"); end
        n_s_precharge++;
      end else begin
        s_a = dr_enc(1'b0); s_b = dr_enc(1'b0); s_edge();
      end
    end
  end

  task automatic need(input int n, input string what);
    checks++;
    $display("  %-34s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL: %s never happened", what); end
  endtask

  initial begin
    repeat (3) @(posedge p_clk);
    p_rst_n = 1'b1;
    while (got < 100) @(posedge p_clk);
    checks++;
    if (pmin != 6 || pmax != 6) begin
      failures++; $display("FAIL: token period %0d..%0d clk, expected 6", pmin, pmax);
    end
    stall_pct = 40; idle_pct = 20;
    while (got < NTOK) @(posedge p_clk);
    wait (n_words == 300);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: results missing"); end
    $display("mechanisms:");
    need(got,           "pipelined additions");
    need(n_sink_stall,  "sink stalls");
    need(n_src_wait,    "source back-pressure");
    need(n_inflight2,   "cycles with 2+ tokens in flight");
    need(n_full_ripple, "carry through every stage");
    need(n_alternate,   "tokens in stages 1 and 3, 2 empty");
    need(n_carry_out,   "carry out of last stage");
    need(n_pre_first,   "first-stage precharges");
    need(n_pre_last,    "last-stage precharges");
    need(n_words,       "serial words");
    need(n_rise_carry,  "carry held after rising edge");
    need(n_fall_carry,  "carry held after falling edge");
    need(n_s_precharge, "serial precharges");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
