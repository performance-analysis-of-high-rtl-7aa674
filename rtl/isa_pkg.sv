// isa_pkg: shared constants of the pipelined inexact speculative adder.
//
// The adder splits an N-bit addition into N/X sub-adders of X bits. The carry
// into every sub-adder but the first is guessed from the R most significant bit
// pairs of the sub-adder below it. A compensator per boundary then corrects the
// LSB_BITS lowest sum bits of the upper sub-adder, or balances the BAL_BITS
// highest sum bits of the lower one. The values below are the 16-bit, 4-bit
// block configuration drawn in the architecture of the pipelined adder; the
// speculator's assumed carry-in (SPEC_CIN) is this design's own choice.
package isa_pkg;

  localparam int unsigned ISA_N        = 16; // operand width
  localparam int unsigned ISA_X        = 4;  // sub-adder (PCLA) width
  localparam int unsigned ISA_R        = 2;  // speculated MSB window per block
  localparam int unsigned ISA_LSB_BITS = 1;  // corrected LSBs of the upper block
  localparam int unsigned ISA_BAL_BITS = 2;  // balanced MSBs of the lower block
  localparam bit          ISA_SPEC_CIN = 1'b0; // carry assumed into the window

  // Five pipeline stages separate six register levels (L0 .. L5).
  localparam int unsigned ISA_STAGES   = 5;

endpackage
