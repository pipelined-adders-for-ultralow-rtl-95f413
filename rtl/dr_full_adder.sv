// dr_full_adder: dual-rail domino full adder with precharge control.
//
// Function: when the stage is in evaluate (ackpre = 1) and all three inputs
// are valid dual-rail bits, the outputs become the dual-rail sum and carry:
//   SUM   = A'B'C + A'BC' + AB'C' + ABC
//   CARRY = AB + AC + BC
// The carry-true pull-down network is the one drawn for the design: Cin_true
// in series with (A_true || B_true), in parallel with A_true in series with
// B_true; the carry-false network is its mirror on the false rails. The sum
// rails use one minterm path per input combination on the appropriate rails.
//
// Domino behaviour: each output is the inverted dynamic node of a footless
// domino gate. With ackpre = 0 the PMOS precharge pulls the dynamic nodes
// high, so every output is null (0). With ackpre = 1 a node can only be
// discharged, so an output that has risen stays high until the next
// precharge even if the inputs return to null. That hold is what lets a PS0
// stage keep its token while its predecessor precharges.
//
// Timing model: the circuit is asynchronous; here each dynamic node is a
// register updated on `clk`, which stands for one gate delay of simulated
// time and carries no handshake meaning. An output therefore rises one clk
// after its inputs become valid and falls one clk after ackpre falls.
// rst_n (active low, asynchronous) puts all nodes in the precharged state.
//
// Ports: a, b, cin dual-rail inputs; sum, cout dual-rail outputs; comb_sum
// and comb_cout give the same pull-down function without the dynamic state
// (ackpre still forces null), for users that store the result elsewhere,
// such as the bit-serial adder.
module dr_full_adder
  import dr_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    ackpre,     // 0: precharge, 1: evaluate
  input  dr_bit_t a,
  input  dr_bit_t b,
  input  dr_bit_t cin,
  output dr_bit_t sum,
  output dr_bit_t cout,
  output dr_bit_t comb_sum,
  output dr_bit_t comb_cout
);

  // Pull-down networks: 1 means the network conducts and discharges the node.
  logic pd_cout_t, pd_cout_f, pd_sum_t, pd_sum_f;

  always_comb begin
    pd_cout_t = (cin.t & (a.t | b.t)) | (a.t & b.t);
    pd_cout_f = (cin.f & (a.f | b.f)) | (a.f & b.f);
    pd_sum_t  = (a.f & b.f & cin.t) | (a.f & b.t & cin.f)
              | (a.t & b.f & cin.f) | (a.t & b.t & cin.t);
    pd_sum_f  = (a.f & b.f & cin.f) | (a.f & b.t & cin.t)
              | (a.t & b.f & cin.t) | (a.t & b.t & cin.f);
  end

  always_comb begin
    comb_sum  = ackpre ? '{t: pd_sum_t,  f: pd_sum_f}  : DR_NULL;
    comb_cout = ackpre ? '{t: pd_cout_t, f: pd_cout_f} : DR_NULL;
  end

  // Dynamic nodes (stored as the inverted output value).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum  <= DR_NULL;
      cout <= DR_NULL;
    end else if (!ackpre) begin
      sum  <= DR_NULL;
      cout <= DR_NULL;
    end else begin
      sum  <= sum  | comb_sum;
      cout <= cout | comb_cout;
    end
  end

endmodule
