// isa_pipelined: fine-grain pipelined inexact speculative adder (ISA).
//
// An N-bit adder built from N/X independent X-bit carry look-ahead sub-adders
// (PCLA). Sub-adder 0 takes the real carry-in; every other sub-adder j takes a
// carry guessed by a speculator (PSPEC) from the top R bit pairs of sub-adder
// j-1, so no carry ripples between sub-adders. Each of the N/X-1 boundaries has
// a compensator (PCOMP) that compares the guess with the carry sub-adder j-1
// really produced and, on a mismatch, either corrects the lowest LSB_BITS sum
// bits of sub-adder j or, if that field would wrap, balances the top BAL_BITS
// sum bits of sub-adder j-1. The result is exact whenever every guess was
// right and close to exact otherwise. For N = 16, X = 4 the outputs are:
//   s[1:0], s[5], s[9], s[15:13], cout   straight from the sub-adders
//   s[4], s[8], s[12]                    corrected by PCOMP 0, 1, 2
//   s[3:2], s[7:6], s[11:10]             balanced by PCOMP 0, 1, 2
//
// Pipeline: six register levels L0..L5 with five stages between them.
//   L0  operand/carry-in registers
//   L1  PSPEC stage 1 (g, p of the window); operands re-timed for the PCLAs
//   L2  PSPEC stage 2 (speculated carries); PCLA stage 1 (look-ahead terms)
//   L3  PCLA stage 2 (sums and carries out)
//   L4  PCOMP stage 1 (error flags, incremented/decremented LSBs)
//   L5  PCOMP stage 2 (corrected and balanced outputs), output registers
// A new addition can enter every clock; its result appears with out_valid on
// the sixth rising edge counted from the one that samples in_valid (latency
// five cycles after L0). Each level loads only when a live operation reaches it
// (stage_gate_ctrl), the RTL form of per-stage clock gating.
//
// Interface: in_valid/a/b/cin are sampled on a rising clk edge; sum/cout and
// the per-boundary flags (fe: speculation error, corrected, balanced; bit j is
// the boundary between sub-adders j and j+1) belong to the result marked by
// out_valid and are held until the next one. rst_n is asynchronous, active
// low.
//
// The block structure, the bit fields each compensator touches, the widths and
// the stage/level counts follow the source design. Where the stage boundaries
// fall inside each sub-block, the re-timing register at L1, the flag outputs
// and the valid-chain gating control are this design's choices.
module isa_pipelined #(
  parameter int unsigned N        = isa_pkg::ISA_N,
  parameter int unsigned X        = isa_pkg::ISA_X,
  parameter int unsigned R        = isa_pkg::ISA_R,
  parameter int unsigned LSB_BITS = isa_pkg::ISA_LSB_BITS,
  parameter int unsigned BAL_BITS = isa_pkg::ISA_BAL_BITS,
  parameter bit          SPEC_CIN = isa_pkg::ISA_SPEC_CIN,
  localparam int unsigned NB      = N / X   // number of sub-adders
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  input  logic          cin,
  output logic          out_valid,
  output logic [N-1:0]  sum,
  output logic          cout,
  output logic [NB-2:0] fe,          // speculation error per boundary
  output logic [NB-2:0] corrected,   // LSBs of the upper sub-adder corrected
  output logic [NB-2:0] balanced     // MSBs of the lower sub-adder balanced
);

  localparam int unsigned STAGES = isa_pkg::ISA_STAGES;

  if (N % X != 0 || NB < 2) begin : g_chk_blocks
    $error("isa_pipelined: N must be a multiple of X with at least two sub-adders");
  end
  if (R == 0 || R >= X) begin : g_chk_window
    $error("isa_pipelined: the speculation window must satisfy 0 < R < X");
  end
  if (LSB_BITS == 0 || BAL_BITS == 0 || LSB_BITS + BAL_BITS > X) begin : g_chk_fields
    $error("isa_pipelined: compensated fields must fit in one sub-adder");
  end

  // ---------------------------------------------------------------- gating
  logic [STAGES:0] en;

  stage_gate_ctrl #(.STAGES(STAGES)) u_gate (
    .clk, .rst_n, .in_valid, .en, .out_valid
  );

  // ---------------------------------------------------------------- L0, L1
  logic [N-1:0] a_l0, b_l0, a_l1, b_l1;
  logic         cin_l0, cin_l1, cin_l2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_l0 <= '0; b_l0 <= '0; cin_l0 <= 1'b0;
    end else if (en[0]) begin
      a_l0 <= a;  b_l0 <= b;  cin_l0 <= cin;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_l1 <= '0; b_l1 <= '0; cin_l1 <= 1'b0;
    end else if (en[1]) begin
      a_l1 <= a_l0; b_l1 <= b_l0; cin_l1 <= cin_l0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     cin_l2 <= 1'b0;
    else if (en[2]) cin_l2 <= cin_l1;
  end

  // ---------------------------------------------------------- speculators
  logic [NB-2:0] spec_l2, spec_l3;

  for (genvar j = 0; j < NB - 1; j++) begin : g_spec
    pspec #(.R(R), .SPEC_CIN(SPEC_CIN)) u_pspec (
      .clk, .rst_n,
      .en  (en[2:1]),
      .a   (a_l0[j*X + X-1 -: R]),
      .b   (b_l0[j*X + X-1 -: R]),
      .cso (spec_l2[j])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     spec_l3 <= '0;
    else if (en[3]) spec_l3 <= spec_l2;
  end

  // ------------------------------------------------------------ sub-adders
  logic [NB-1:0]       blk_cin, blk_cout;
  logic [NB-1:0][X-1:0] blk_s;

  assign blk_cin = {spec_l2, cin_l2};

  for (genvar j = 0; j < NB; j++) begin : g_cla
    pcla #(.X(X)) u_pcla (
      .clk, .rst_n,
      .en   (en[3:2]),
      .a    (a_l1[j*X +: X]),
      .b    (b_l1[j*X +: X]),
      .cin  (blk_cin[j]),
      .s    (blk_s[j]),
      .cout (blk_cout[j])
    );
  end

  // ----------------------------------------------------------- compensators
  logic [NB-2:0][LSB_BITS-1:0] lsb_c;
  logic [NB-2:0][BAL_BITS-1:0] msb_c;

  for (genvar j = 0; j < NB - 1; j++) begin : g_comp
    pcomp #(.LSB_BITS(LSB_BITS), .BAL_BITS(BAL_BITS)) u_pcomp (
      .clk, .rst_n,
      .en        (en[5:4]),
      .spec      (spec_l3[j]),
      .cout      (blk_cout[j]),
      .s_lsb     (blk_s[j+1][LSB_BITS-1:0]),
      .s_msb     (blk_s[j][X-1 -: BAL_BITS]),
      .s_lsb_o   (lsb_c[j]),
      .s_msb_o   (msb_c[j]),
      .fe        (fe[j]),
      .corrected (corrected[j]),
      .balanced  (balanced[j])
    );
  end

  // ------------------------------------- bypass of untouched bits, L4 and L5
  logic [N-1:0] s_l4, s_l5;
  logic         cout_l4, cout_l5;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_l4 <= '0; cout_l4 <= 1'b0;
      s_l5 <= '0; cout_l5 <= 1'b0;
    end else begin
      if (en[4]) begin
        s_l4    <= blk_s;
        cout_l4 <= blk_cout[NB-1];
      end
      if (en[5]) begin
        s_l5    <= s_l4;
        cout_l5 <= cout_l4;
      end
    end
  end

  // Merge the compensated fields into the bypassed sum.
  always_comb begin
    sum = s_l5;
    for (int j = 0; j < int'(NB) - 1; j++) begin
      sum[(j+1)*X +: LSB_BITS]          = lsb_c[j];
      sum[j*X + X - BAL_BITS +: BAL_BITS] = msb_c[j];
    end
  end

  assign cout = cout_l5;

endmodule
