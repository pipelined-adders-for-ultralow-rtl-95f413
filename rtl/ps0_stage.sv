// ps0_stage: one stage of the PS0 dual-rail adder pipeline.
//
// A stage is a functional block (FB) followed by a completion detector
// (CDC). The FB is the dual-rail domino full adder; in this pipelined
// ripple-carry arrangement stage BIT adds operand bit BIT and the incoming
// carry. The token carried from stage to stage has N bit positions on the
// a/sum field, N on the b field and one carry:
//   a[BIT] is replaced by the sum bit, c by the carry out,
//   all other bits are copied by dual-rail domino buffers.
// Carrying the unused operand bits and the finished sum bits along with
// the token is this design's choice; the design only shows the adder cell
// with its a, b, c inputs and sum, carry outputs.
//
// Handshake (PS0): ackpre comes from the CDC of the next stage.
//   ackpre = 1  evaluate: outputs rise as inputs become valid, then hold
//   ackpre = 0  precharge: all outputs return to null
// acknxt is this stage's CDC output (0 = all output bits valid, 1 = all
// null) and goes to the ackpre input of the previous stage. The CDC watches
// every bit of the stage's output data path.
//
// Timing (clk = one gate delay of simulated time): outputs valid one clk
// after the inputs, acknxt falls one clk later; precharge and the rise of
// acknxt take one clk each. Parameters: N bits per token, BIT < N.
// Assertions check the dual-rail code, the precharge and the domino hold.
module ps0_stage
  import dr_pkg::*;
#(
  parameter int unsigned N   = 3,
  parameter int unsigned BIT = 0
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            ackpre,
  input  dr_bit_t [N-1:0] a_in,
  input  dr_bit_t [N-1:0] b_in,
  input  dr_bit_t         c_in,
  output dr_bit_t [N-1:0] a_out,
  output dr_bit_t [N-1:0] b_out,
  output dr_bit_t         c_out,
  output logic            acknxt
);

  dr_bit_t fa_sum, fa_cout;
  dr_bit_t unused_sum, unused_cout;

  dr_full_adder u_fa (
    .clk       (clk),
    .rst_n     (rst_n),
    .ackpre    (ackpre),
    .a         (a_in[BIT]),
    .b         (b_in[BIT]),
    .cin       (c_in),
    .sum       (fa_sum),
    .cout      (fa_cout),
    .comb_sum  (unused_sum),
    .comb_cout (unused_cout)
  );

  // Domino buffers for the bits that pass through unchanged.
  dr_bit_t [N-1:0] a_buf, b_buf;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_buf <= '0;
      b_buf <= '0;
    end else if (!ackpre) begin
      a_buf <= '0;
      b_buf <= '0;
    end else begin
      a_buf <= a_buf | a_in;
      b_buf <= b_buf | b_in;
    end
  end

  always_comb begin
    a_out      = a_buf;
    a_out[BIT] = fa_sum;
    b_out      = b_buf;
    c_out      = fa_cout;
  end

  // Protocol rules of the stage, checked against the previous clk.
  localparam int unsigned TW = 2 * N + 1;
  logic [2*TW-1:0] out_now, out_prev;
  logic            ackpre_prev, chk_en;

  assign out_now = {a_out, b_out, c_out};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_prev    <= '0;
      ackpre_prev <= 1'b0;
      chk_en      <= 1'b0;
    end else begin
      out_prev    <= out_now;
      ackpre_prev <= ackpre;
      chk_en      <= 1'b1;
    end
  end

  // Dual-rail outputs never show the illegal code 11.
  a_dr_legal: assert property (@(posedge clk) disable iff (!chk_en)
    ((out_now & (out_now >> 1)) & {TW{2'b01}}) == '0)
    else $error("ps0_stage: illegal dual-rail code 11 on an output");
  // A precharge command empties the stage on the next clk.
  a_precharge: assert property (@(posedge clk) disable iff (!chk_en)
    !ackpre_prev |-> (out_now == '0))
    else $error("ps0_stage: outputs not null after precharge");
  // While evaluating, an output rail that has risen stays high (domino hold).
  a_hold: assert property (@(posedge clk) disable iff (!chk_en)
    ackpre_prev |-> ((out_now & out_prev) == out_prev))
    else $error("ps0_stage: an evaluated output fell before precharge");

  completion_detector #(.W(2 * N + 1)) u_cdc (
    .clk    (clk),
    .rst_n  (rst_n),
    .data   ({a_out, b_out, c_out}),
    .done_n (acknxt)
  );

endmodule
