// pcomp: pipelined compensator (PCOMP) for one sub-adder boundary.
//
// Sub-adder i+1 added with a speculated carry-in `spec`; sub-adder i produced
// its own carry out `cout`. Their XOR is the error flag fe. A positive error
// (spec 0, cout 1) left the upper sum one unit low; a negative error (spec 1,
// cout 0) left it one unit high. The compensator first tries to correct: it
// increments (positive) or decrements (negative) the LSB_BITS lowest sum bits
// of sub-adder i+1, which is exact as long as that field does not wrap. If it
// would wrap (all ones on an increment, all zeros on a decrement) the LSBs are
// left alone and the BAL_BITS highest sum bits of sub-adder i are balanced
// instead: set to all ones for a positive error, all zeros for a negative one,
// which moves the sum towards the exact value and bounds the residual error.
// With no error both fields pass through unchanged.
//
// Timing: two pipeline stages. Stage 1 registers fe, the error direction, the
// incremented/decremented LSBs and their wrap flag (the incrementer and XOR of
// the compensator); stage 2 registers the multiplexer outputs. Outputs follow
// the inputs by two enabled edges. en[0]/en[1] are the stage clock enables.
// Reset is asynchronous, active low. The flags `corrected` and `balanced` are
// registered with the outputs and report which action was taken.
//
// Correction, balancing towards (11)b, the XOR error flag and the
// wrap-controlled selection follow the source design; the decrement and
// balancing towards (00)b for a negative error follow its description of both
// error directions. The field widths are taken from the 16-bit architecture.
module pcomp #(
  parameter int unsigned LSB_BITS = isa_pkg::ISA_LSB_BITS,
  parameter int unsigned BAL_BITS = isa_pkg::ISA_BAL_BITS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [1:0]          en,        // stage enables: [0] stage 1, [1] stage 2
  input  logic                spec,      // speculated carry into sub-adder i+1
  input  logic                cout,      // carry produced by sub-adder i
  input  logic [LSB_BITS-1:0] s_lsb,     // low sum bits of sub-adder i+1
  input  logic [BAL_BITS-1:0] s_msb,     // high sum bits of sub-adder i
  output logic [LSB_BITS-1:0] s_lsb_o,   // corrected low bits of sub-adder i+1
  output logic [BAL_BITS-1:0] s_msb_o,   // balanced high bits of sub-adder i
  output logic                fe,        // error flag
  output logic                corrected, // LSBs were incremented/decremented
  output logic                balanced   // MSBs were balanced
);

  logic                fe_q, pos_q, wrap_q;
  logic [LSB_BITS-1:0] adj_q, lsb_q;
  logic [BAL_BITS-1:0] msb_q;

  // Stage 1: error detection and the pre-computed correction.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fe_q   <= 1'b0;
      pos_q  <= 1'b0;
      wrap_q <= 1'b0;
      adj_q  <= '0;
      lsb_q  <= '0;
      msb_q  <= '0;
    end else if (en[0]) begin
      fe_q   <= spec ^ cout;
      pos_q  <= cout;                       // meaningful only when fe
      wrap_q <= cout ? (&s_lsb) : ~(|s_lsb);
      adj_q  <= cout ? s_lsb + 1'b1 : s_lsb - 1'b1;
      lsb_q  <= s_lsb;
      msb_q  <= s_msb;
    end
  end

  // Stage 2: select correction or balancing.
  logic do_corr, do_bal;
  assign do_corr = fe_q & ~wrap_q;
  assign do_bal  = fe_q &  wrap_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_lsb_o   <= '0;
      s_msb_o   <= '0;
      fe        <= 1'b0;
      corrected <= 1'b0;
      balanced  <= 1'b0;
    end else if (en[1]) begin
      s_lsb_o   <= do_corr ? adj_q : lsb_q;
      s_msb_o   <= do_bal ? {BAL_BITS{pos_q}} : msb_q;
      fe        <= fe_q;
      corrected <= do_corr;
      balanced  <= do_bal;
    end
  end

  // A flagged error is repaired in exactly one way; no error, no action.
  // Holds in reset too, where all three flags are cleared.
  a_one_action: assert property (@(posedge clk)
    (corrected ^ balanced) == fe && !(corrected && balanced));

endmodule
