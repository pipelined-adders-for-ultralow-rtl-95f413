// adder_top: the complete design. It holds, side by side and each with its
// own ports:
//   * the three-stage asynchronous PS0 dual-rail pipelined adder
//     (p_* ports), which adds STAGES-bit operands, one bit per stage, with
//     the request/acknowledge style handshake described in ps0_pipeline;
//   * the bit-serial dual-rail adder (s_* ports): one full adder and a
//     double-edge-triggered carry flip-flop, one bit per clock edge.
// Both use the same dual-rail domino full adder cell. p_clk is the
// simulated gate-delay time base of the asynchronous model; s_clk is the
// real bit clock of the serial adder. Resets are active low, asynchronous.
module adder_top
  import dr_pkg::*;
#(
  parameter int unsigned STAGES = 3
) (
  input  logic                 p_clk,
  input  logic                 p_rst_n,
  input  dr_bit_t [STAGES-1:0] p_a,
  input  dr_bit_t [STAGES-1:0] p_b,
  input  dr_bit_t              p_cin,
  output logic                 p_acknxt,
  output dr_bit_t [STAGES-1:0] p_sum,
  output dr_bit_t [STAGES-1:0] p_b_out,
  output dr_bit_t              p_cout,
  output logic                 p_done_n,
  input  logic                 p_ackpre,

  input  logic                 s_clk,
  input  logic                 s_rst_n,
  input  logic                 s_ackpre,
  input  dr_bit_t              s_a,
  input  dr_bit_t              s_b,
  output dr_bit_t              s_sum,
  output dr_bit_t              s_cout,
  output logic                 s_carry_q
);

  ps0_pipeline #(.STAGES(STAGES)) u_pipe (
    .clk        (p_clk),
    .rst_n      (p_rst_n),
    .a_in       (p_a),
    .b_in       (p_b),
    .c_in       (p_cin),
    .in_ack     (p_acknxt),
    .sum_out    (p_sum),
    .b_out      (p_b_out),
    .c_out      (p_cout),
    .out_done_n (p_done_n),
    .out_ackpre (p_ackpre)
  );

  serial_adder u_serial (
    .clk     (s_clk),
    .rst_n   (s_rst_n),
    .ackpre  (s_ackpre),
    .a       (s_a),
    .b       (s_b),
    .sum     (s_sum),
    .cout    (s_cout),
    .carry_q (s_carry_q)
  );

endmodule
