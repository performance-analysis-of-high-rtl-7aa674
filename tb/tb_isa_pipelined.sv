// tb_isa_pipelined: end-to-end self-checking testbench of the pipelined
// inexact speculative adder.
//
// Two adders run side by side on the same stimulus: the default one, whose
// speculators assume a carry-in of 0 into their window (errors can only be
// positive), and one whose speculators assume 1 (errors are then mostly
// negative). Operands come in bursts with random gaps, so the pipeline fills,
// drains and idles; random operands are mixed with operands built to make a
// chosen boundary mis-speculate with the corrected field at, or away from, its
// wrap value. Every result is compared with the integer model in
// tb_isa_model_pkg (sum, carry out and the per-boundary flags), a result with no
// speculation error must equal the exact sum, and a result must appear exactly
// five cycles after its operands were registered. The testbench counts exact
// results, corrections up and down, balancing to ones and to zeros, gated
// (idle) stage-cycles and back-to-back results, and fails if any never
// happened.
module tb_isa_pipelined;
  import tb_isa_model_pkg::*;

  localparam int unsigned N = 16, X = 4, R = 2, LB = 1, BB = 2;
  localparam int unsigned NB = N / X;
  localparam int unsigned NT = 4000;
  localparam int unsigned LAT = 5;   // L0 .. L5

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, cin;
  logic [N-1:0] a, b;
  logic          ov0, ov1, co0, co1;
  logic [N-1:0]  s0, s1;
  logic [NB-2:0] fe0, fe1, cr0, cr1, bl0, bl1;

  int checks = 0, failures = 0;
  int n_exact = 0, n_inc = 0, n_dec = 0, n_bal1 = 0, n_bal0 = 0;
  int n_gated = 0, n_b2b = 0, n_results = 0;

  // issue history: operands and the cycle they were sampled
  logic [N-1:0] qa[$], qb[$];
  logic         qc[$];
  int           qt[$];
  int cyc = 0;

  isa_pipelined dut0 (.clk, .rst_n, .in_valid, .a, .b, .cin, .out_valid(ov0),
                      .sum(s0), .cout(co0), .fe(fe0), .corrected(cr0), .balanced(bl0));
  isa_pipelined #(.SPEC_CIN(1'b1)) dut1 (.clk, .rst_n, .in_valid, .a, .b, .cin, .out_valid(ov1),
                      .sum(s1), .cout(co1), .fe(fe1), .corrected(cr1), .balanced(bl1));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NT + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Operands that make boundary j mis-speculate: the speculation window
  // (top R bits of block j) produces no carry on its own, block j's lower
  // bits do. Field "lo" of block j+1 is set to its wrap value or not.
  function automatic void directed(int j, bit wrap_hi, output logic [N-1:0] oa, output logic [N-1:0] ob);
    oa = N'($urandom);
    ob = N'($urandom);
    // window: a=01, b=10 -> propagates, no generate; lower: a=11, b=01 -> carry
    oa[j*X +: X] = 4'b0111;
    ob[j*X +: X] = 4'b1001;
    // block j+1 low bit: sum 1 (wraps on increment) or 0
    oa[(j+1)*X] = wrap_hi;
    ob[(j+1)*X] = 1'b0;
  endfunction

  function automatic void directed_neg(int j, bit zero, output logic [N-1:0] oa, output logic [N-1:0] ob);
    oa = N'($urandom);
    ob = N'($urandom);
    // window 01+10 with an assumed carry-in of 1 carries; lower bits 00+00 do not
    oa[j*X +: X] = 4'b0100;
    ob[j*X +: X] = 4'b1000;
    oa[(j+1)*X] = ~zero;
    ob[(j+1)*X] = 1'b0;
  endfunction

  task automatic check_one(input logic [N-1:0] ea, input logic [N-1:0] eb, input logic ec,
                           input bit spec_cin, input logic [N-1:0] gs, input logic gco,
                           input logic [NB-2:0] gfe, input logic [NB-2:0] gcr,
                           input logic [NB-2:0] gbl, input string tag);
    isa_res_t m;
    longint unsigned exact;
    m = isa_model(64'(ea), 64'(eb), ec, N, X, R, LB, BB, spec_cin);
    checks++;
    if (64'(gs) != m.sum || gco != m.cout || gfe != m.fe[NB-2:0] ||
        gcr != m.cor[NB-2:0] || gbl != m.bal[NB-2:0]) begin
      failures++;
      $display("%s: %h + %h + %b -> %h/%b fe=%b cr=%b bl=%b, model %h/%b fe=%b cr=%b bl=%b",
               tag, ea, eb, ec, gs, gco, gfe, gcr, gbl, m.sum, m.cout,
               m.fe[NB-2:0], m.cor[NB-2:0], m.bal[NB-2:0]);
    end
    exact = 64'(ea) + 64'(eb) + 64'(ec);
    if (gfe == '0) begin
      checks++;
      n_exact++;
      if ({gco, gs} != (N+1)'(exact)) begin
        failures++;
        $display("%s: no error flagged but result is not exact", tag);
      end
    end
    for (int j = 0; j < int'(NB) - 1; j++) begin
      if (gcr[j] &&  m.pos[j]) n_inc++;
      if (gcr[j] && !m.pos[j]) n_dec++;
      if (gbl[j] &&  m.pos[j]) n_bal1++;
      if (gbl[j] && !m.pos[j]) n_bal0++;
    end
  endtask

  // Result checker: runs on every clock.
  always @(negedge clk) begin
    if (rst_n) begin
      n_gated += ((dut0.en == '1) ? 0 : 1);
      checks++;
      if (ov0 !== ov1) begin
        failures++;
        $display("out_valid of the two adders differ");
      end
      if (ov0) begin
        if (qa.size() == 0) begin
          failures++;
          $display("result with no operation in flight");
        end else begin
          logic [N-1:0] ea, eb;
          logic ec;
          int t;
          ea = qa.pop_front(); eb = qb.pop_front(); ec = qc.pop_front(); t = qt.pop_front();
          checks++;
          // cyc - 1 is the index of the edge that loaded the output level
          if (cyc - 1 - t != int'(LAT)) begin
            failures++;
            $display("latency %0d, expected %0d", cyc - 1 - t, LAT);
          end
          check_one(ea, eb, ec, 1'b0, s0, co0, fe0, cr0, bl0, "spec_cin=0");
          check_one(ea, eb, ec, 1'b1, s1, co1, fe1, cr1, bl1, "spec_cin=1");
          n_results++;
        end
      end
    end
  end

  // Count back-to-back results.
  logic ov_prev = 1'b0;
  always @(posedge clk) begin
    if (ov0 && ov_prev) n_b2b++;
    ov_prev <= ov0;
  end

  initial begin
    in_valid = 1'b0; a = '0; b = '0; cin = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < int'(NT); k++) begin
      int kind;
      int j;
      in_valid = ((k / 50) % 3 != 2) ? 1'b1 : (($urandom % 3) == 0);
      kind = $urandom % 6;
      j = $urandom % (NB - 1);
      cin = 1'($urandom);
      case (kind)
        0: directed(j, 1'b0, a, b);
        1: directed(j, 1'b1, a, b);
        2: directed_neg(j, 1'b0, a, b);
        3: directed_neg(j, 1'b1, a, b);
        default: begin a = N'($urandom); b = N'($urandom); end
      endcase
      @(posedge clk);
      // the operands were registered at this edge
      if (in_valid) begin
        qa.push_back(a); qb.push_back(b); qc.push_back(cin); qt.push_back(cyc);
      end
      cyc++;
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (LAT + 3) begin
      @(posedge clk); cyc++;
    end
    checks++;
    if (qa.size() != 0) begin
      failures++;
      $display("%0d operations never produced a result", qa.size());
    end
    $display("results=%0d exact=%0d inc=%0d dec=%0d bal11=%0d bal00=%0d gated=%0d back_to_back=%0d",
             n_results, n_exact, n_inc, n_dec, n_bal1, n_bal0, n_gated, n_b2b);
    checks++;
    if (n_exact == 0 || n_inc == 0 || n_dec == 0 || n_bal1 == 0 || n_bal0 == 0 ||
        n_gated == 0 || n_b2b == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
