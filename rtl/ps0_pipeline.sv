// ps0_pipeline: asynchronous dual-rail pipelined ripple-carry adder built as
// a PS0 pipeline of STAGES stages, one bit position per stage.
//
// A token is an addition: operands a and b (STAGES bits each) and a carry
// in, all dual-rail. Stage k adds bit k and hands the carry to stage k+1 in
// the same token, so a new addition can enter as soon as stage 1 is free
// while earlier ones are still rippling. The result token leaving the last
// stage holds the sum on its a field and the carry out on c.
//
// PS0 control: each stage's ackpre is the completion detector output of
// the next stage. A stage precharges once its successor has evaluated and
// evaluates again once its successor has precharged, so tokens sit in
// alternate stages. The source side sees in_ack (stage 1's detector): it may
// present a new valid token while in_ack = 1 and must return its data to
// null promptly after in_ack falls (within 3 clk; PS0 relies on this
// timing). The sink side drives out_ackpre like a following stage: 0 after
// it has taken a valid result, 1 after the result has gone null; out_done_n
// is the last stage's detector output (0 = result valid).
//
// Cycle time: per the design, 3 T_eval + T_precharge + 2 T_cd. With one clk
// for each of these in this model that is 6 clk per token when source and
// sink respond within that cycle.
// The three-stage depth follows the design; clk is simulated time only.
// Assertions check the source side of the handshake.
module ps0_pipeline
  import dr_pkg::*;
#(
  parameter int unsigned STAGES = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  dr_bit_t [STAGES-1:0] a_in,
  input  dr_bit_t [STAGES-1:0] b_in,
  input  dr_bit_t              c_in,
  output logic                 in_ack,
  output dr_bit_t [STAGES-1:0] sum_out,
  output dr_bit_t [STAGES-1:0] b_out,
  output dr_bit_t              c_out,
  output logic                 out_done_n,
  input  logic                 out_ackpre
);

  dr_bit_t [STAGES:0][STAGES-1:0] a_s, b_s;
  dr_bit_t [STAGES:0]             c_s;
  logic    [STAGES-1:0]           done_n;  // detector output of each stage
  logic    [STAGES-1:0]           ackpre;  // precharge control of each stage

  assign a_s[0] = a_in;
  assign b_s[0] = b_in;
  assign c_s[0] = c_in;

  always_comb begin
    for (int k = 0; k < STAGES; k++)
      ackpre[k] = (k == STAGES - 1) ? out_ackpre : done_n[(k + 1) % STAGES];
  end

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    ps0_stage #(.N(STAGES), .BIT(k)) u_stage (
      .clk    (clk),
      .rst_n  (rst_n),
      .ackpre (ackpre[k]),
      .a_in   (a_s[k]),
      .b_in   (b_s[k]),
      .c_in   (c_s[k]),
      .a_out  (a_s[k+1]),
      .b_out  (b_s[k+1]),
      .c_out  (c_s[k+1]),
      .acknxt (done_n[k])
    );
  end

  // Source rule (four-phase, return to zero): an input bit that is valid
  // stays at the same value until it returns to null, and the source does
  // not start a new token while stage 1 still reports the previous one.
  // The inputs and in_ack of the previous clk are kept for the comparison.
  localparam int unsigned TW = 2 * STAGES + 1;
  dr_bit_t [TW-1:0] tok_now, tok_prev;
  logic             in_ack_prev, chk_en;

  assign tok_now = {a_in, b_in, c_in};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tok_prev    <= '0;
      in_ack_prev <= 1'b1;
      chk_en      <= 1'b0;
    end else begin
      tok_prev    <= tok_now;
      in_ack_prev <= in_ack;
      chk_en      <= 1'b1;
    end
  end

  for (genvar i = 0; i < TW; i++) begin : g_src_rule
    a_src_stable: assert property (@(posedge clk) disable iff (!chk_en)
      dr_is_valid(tok_prev[i]) |-> (tok_now[i] == tok_prev[i] || dr_is_null(tok_now[i])))
      else $error("ps0_pipeline: input bit %0d changed without returning to null", i);
    a_src_wait: assert property (@(posedge clk) disable iff (!chk_en)
      dr_is_null(tok_prev[i]) && dr_is_valid(tok_now[i]) |-> in_ack_prev)
      else $error("ps0_pipeline: new input while stage 1 was not ready");
  end

  assign in_ack     = done_n[0];
  assign out_done_n = done_n[STAGES-1];
  assign sum_out    = a_s[STAGES];
  assign b_out      = b_s[STAGES];
  assign c_out      = c_s[STAGES];

endmodule
