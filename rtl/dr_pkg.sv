// dr_pkg: shared types and helpers for the dual-rail (return-to-zero) data
// encoding used throughout the adder.
//
// Each logical bit travels on two wires, a "true" rail and a "false" rail.
//   {t,f} = 00  null (spacer): the precharged state, no data
//   {t,f} = 10  valid logic 1
//   {t,f} = 01  valid logic 0
//   {t,f} = 11  illegal; the domino gates never produce it
// A token of W bits is complete when every bit is valid and empty when every
// bit is null. The encoding follows the true/false rail naming of the
// design (atrue/afalse, sumtrue/sumfalse, ...); the struct layout is this
// design's choice.
package dr_pkg;

  typedef struct packed {
    logic t;  // true rail
    logic f;  // false rail
  } dr_bit_t;

  localparam dr_bit_t DR_NULL = '{t: 1'b0, f: 1'b0};

  // Encode a single-rail bit as a valid dual-rail bit.
  function automatic dr_bit_t dr_enc(input logic v);
    return '{t: v, f: ~v};
  endfunction

  function automatic logic dr_is_valid(input dr_bit_t b);
    return b.t ^ b.f;
  endfunction

  function automatic logic dr_is_null(input dr_bit_t b);
    return ~(b.t | b.f);
  endfunction

endpackage
