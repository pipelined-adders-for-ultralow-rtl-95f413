// det_dff: double-edge-triggered D flip-flop.
//
// Q takes the value of D on every rising and every falling edge of clk, so
// one clock period stores two data items; Q' is its complement. Behaviour,
// ports (D, clock, Q, Q') and the use of both edges follow the design; its
// transistor circuit (two clock-phase paths using CLK and CLK') is not
// modelled. This version uses one register per edge and keeps the stored
// value XOR-encoded across them:
//   rising edge:  p <= d ^ n        falling edge:  n <= d ^ p
//   q = p ^ n
// so after either edge q = d. Q changes only when a register updates,
// never directly with the clock level, which keeps D = f(Q) feedback
// loops (such as the serial adder's carry) free of a race at the edge.
// rst_n (active low, asynchronous) clears Q; the reset is this design's
// addition.
module det_dff (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q,
  output logic q_n
);

  logic p, n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) p <= 1'b0;
    else        p <= d ^ n;
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) n <= 1'b0;
    else        n <= d ^ p;
  end

  assign q   = p ^ n;
  assign q_n = ~q;

endmodule
