// c_element: Muller C-element with N inputs (N = 2 is the van Berkel cell
// used in the completion detector).
//
// The output rises when every input is 1, falls when every input is 0 and
// otherwise keeps its value. That hold makes it the event synchroniser of
// the completion detector. The van Berkel transistor topology itself is a
// circuit-level choice; only its logic behaviour is modelled here.
//
// Timing model: the state node is a register on `clk`, one gate delay of
// simulated time, so z follows its inputs one clk later. rst_n (active low,
// asynchronous) loads RESET_VAL. The N-input generalisation is this design's
// choice; it behaves as a tree of 2-input C-elements without the extra
// delays of the tree levels.
module c_element #(
  parameter int unsigned N         = 2,
  parameter bit          RESET_VAL = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] in,
  output logic         z
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          z <= RESET_VAL;
    else if (&in)        z <= 1'b1;
    else if (~|in)       z <= 1'b0;
  end

endmodule
