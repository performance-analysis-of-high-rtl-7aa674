// pspec: pipelined carry speculator.
//
// Guesses the carry out of an X-bit sub-adder from its R most significant bit
// pairs only, so that the next sub-adder can start without waiting for the
// real carry. Per bit it forms generate g = a & b and propagate p = a ^ b, then
// runs the carry recurrence c(i+1) = g(i) | p(i) & c(i) across the R-bit window
// with the window's carry-in fixed to SPEC_CIN. For R = 2 and SPEC_CIN = 0 this
// is cso = g(msb) | p(msb) & g(msb-1).
//
// Timing: two pipeline stages. Stage 1 registers g and p, stage 2 registers the
// speculated carry, so cso follows a/b by two enabled clock edges. en[0] and
// en[1] are the stage clock enables (the RTL form of a gated stage clock); a
// stage whose enable is low keeps its contents. Reset is asynchronous, active
// low.
//
// The generate/propagate equations and the two-stage split follow the source
// design; the fixed window carry-in and the enable-style gating are this
// design's choices.
module pspec #(
  parameter int unsigned R        = isa_pkg::ISA_R,
  parameter bit          SPEC_CIN = isa_pkg::ISA_SPEC_CIN
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [1:0]   en,   // stage enables: [0] stage 1, [1] stage 2
  input  logic [R-1:0] a,    // operand A bits msb..msb-R+1 of the block
  input  logic [R-1:0] b,    // operand B bits msb..msb-R+1 of the block
  output logic         cso   // speculated carry out of the block
);

  logic [R-1:0] g_q, p_q;
  logic         c_win;

  // Stage 1: bitwise generate and propagate.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g_q <= '0;
      p_q <= '0;
    end else if (en[0]) begin
      g_q <= a & b;
      p_q <= a ^ b;
    end
  end

  // Stage 2: carry recurrence across the window.
  always_comb begin
    c_win = SPEC_CIN;
    for (int i = 0; i < int'(R); i++)
      c_win = g_q[i] | (p_q[i] & c_win);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      cso <= 1'b0;
    else if (en[1])  cso <= c_win;
  end

endmodule
