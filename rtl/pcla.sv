// pcla: X-bit pipelined carry look-ahead adder (PCLA).
//
// Adds two X-bit operands and a carry-in. Stage 1 forms the bit propagate
// p = a ^ b and generate g = a & b and, from them, the carry-in-independent
// look-ahead terms of every prefix: G(i:0) (a carry leaves bit i even with no
// carry-in) and P(i:0) (a carry-in would travel through bits 0..i). Stage 2
// applies the carry-in: c(i+1) = G(i:0) | P(i:0) & cin, sum s(i) = p(i) ^ c(i),
// cout = c(X).
//
// Timing: a and b enter stage 1; cin enters stage 2, one enabled edge later,
// which lets a speculated carry that itself takes one extra stage arrive in
// time. s and cout are registered and follow a/b by two enabled edges and cin
// by one. en[0]/en[1] are the stage clock enables; a stage whose enable is low
// holds. Reset is asynchronous, active low.
//
// The sum and carry equations and the two pipeline stages follow the source
// design; where the pipeline register sits inside the adder (after the
// look-ahead prefix terms) is this design's choice.
module pcla #(
  parameter int unsigned X = isa_pkg::ISA_X
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [1:0]   en,    // stage enables: [0] stage 1, [1] stage 2
  input  logic [X-1:0] a,
  input  logic [X-1:0] b,
  input  logic         cin,   // carry-in, one stage after a/b
  output logic [X-1:0] s,
  output logic         cout
);

  logic [X-1:0] p, g, gpre, ppre;
  logic [X-1:0] p_q, gpre_q, ppre_q;
  logic [X:0]   c;

  // Stage 1: propagate/generate and their prefix (look-ahead) terms.
  always_comb begin
    logic gr, pr;   // running prefix terms
    p  = a ^ b;
    g  = a & b;
    gr = 1'b0;
    pr = 1'b1;
    for (int i = 0; i < int'(X); i++) begin
      gr      = g[i] | (p[i] & gr);
      pr      = p[i] & pr;
      gpre[i] = gr;
      ppre[i] = pr;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_q    <= '0;
      gpre_q <= '0;
      ppre_q <= '0;
    end else if (en[0]) begin
      p_q    <= p;
      gpre_q <= gpre;
      ppre_q <= ppre;
    end
  end

  // Stage 2: every carry in parallel from the carry-in, then the sum.
  always_comb begin
    c[0] = cin;
    for (int i = 0; i < int'(X); i++)
      c[i+1] = gpre_q[i] | (ppre_q[i] & cin);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s    <= '0;
      cout <= 1'b0;
    end else if (en[1]) begin
      s    <= p_q ^ c[X-1:0];
      cout <= c[X];
    end
  end

endmodule
