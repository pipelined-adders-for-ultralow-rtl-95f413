// serial_adder: the bit-serial dual-rail adder cell (full adder plus
// double-edge-triggered carry flip-flop).
//
// Two operands enter least significant bit first, one bit pair per clock
// edge (rising and falling), as dual-rail a and b. The dual-rail full adder
// forms the sum and carry from a, b and the stored carry; the carry-out
// true rail is captured by the double-edge flip-flop on the next clock edge
// and its Q / Q' outputs drive the carry-in true / false rails, so the
// carry of bit i is added into bit i+1. The feedback loop follows the
// design; reset and the `ackpre` port are this design's choices.
//
// Interface and timing:
//   clk      bit clock; bit i is presented after one edge and its carry is
//            taken at the next edge, so a word of W bits needs W edges
//            (W/2 clock periods).
//   rst_n    clears the carry (carry-in 0 for the first bit).
//   ackpre   1 to evaluate; 0 precharges the adder (sum null and carry-out
//            0), which would clear the carry at the next edge. Keep it high
//            while adding.
//   sum      dual-rail sum bit of the current position (combinational).
//   carry_q  carryouttrue: the stored carry (carry into the current bit).
module serial_adder
  import dr_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    ackpre,
  input  dr_bit_t a,
  input  dr_bit_t b,
  output dr_bit_t sum,
  output dr_bit_t cout,
  output logic    carry_q
);

  logic    q, q_n;
  dr_bit_t cin;
  dr_bit_t unused_sum, unused_cout;

  assign cin = '{t: q, f: q_n};

  // The adder's own dynamic outputs are not used: the carry is held by the
  // flip-flop, so the combinational evaluation outputs are taken.
  dr_full_adder u_fa (
    .clk       (clk),
    .rst_n     (rst_n),
    .ackpre    (ackpre),
    .a         (a),
    .b         (b),
    .cin       (cin),
    .sum       (unused_sum),
    .cout      (unused_cout),
    .comb_sum  (sum),
    .comb_cout (cout)
  );

  det_dff u_carry (
    .clk   (clk),
    .rst_n (rst_n),
    .d     (cout.t),
    .q     (q),
    .q_n   (q_n)
  );

  assign carry_q = q;

endmodule
