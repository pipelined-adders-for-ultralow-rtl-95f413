// completion_detector: completion detector circuit (CDC) of one pipeline
// stage.
//
// Every dual-rail bit of the stage's output goes to a 2-input NOR, which is
// 1 while the bit is null and 0 once it is valid. The NOR outputs of all
// bits are merged by a C-element, so the detector output
//   done_n = 0  once every bit is valid   (stage has evaluated)
//   done_n = 1  once every bit is null    (stage has precharged)
// and holds while the bits are mixed. The NOR bit detectors and the
// C-element merge follow the design; the width W is set by the stage.
//
// The output is named for its use: wired to the ackpre input of the
// preceding stage it makes that stage precharge when this one has evaluated
// and evaluate when this one has precharged (PS0 protocol).
// Timing: one clk (gate delay) after the last bit arrives; resets to 1.
module completion_detector
  import dr_pkg::*;
#(
  parameter int unsigned W = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  dr_bit_t [W-1:0] data,
  output logic          done_n
);

  logic [W-1:0] bit_null;

  always_comb begin
    for (int i = 0; i < W; i++) bit_null[i] = ~(data[i].t | data[i].f);
  end

  c_element #(.N(W), .RESET_VAL(1'b1)) u_c (
    .clk   (clk),
    .rst_n (rst_n),
    .in    (bit_null),
    .z     (done_n)
  );

endmodule
