// tb_isa_full: the pipelined inexact speculative adder at its default
// configuration (16 bits, 4-bit sub-adders, 2-bit speculation window), no
// parameter overridden.
//
// Runs an exhaustive sweep of the low two sub-adders (all 2^16 combinations
// of a[7:0] and b[7:0], upper bits random, carry-in alternating) back to back
// through the pipeline, then checks every result against the integer model in
// tb_isa_model_pkg and the five-cycle latency. It also reports the error
// statistics of the sweep: how many results were exact, and the largest
// absolute error.
module tb_isa_full;
  import tb_isa_model_pkg::*;

  localparam int unsigned N = 16, X = 4, R = 2, LB = 1, BB = 2;
  localparam int unsigned NB = N / X;
  localparam int unsigned NT = 65536;
  localparam int unsigned LAT = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, cin;
  logic [N-1:0] a, b;
  logic          ov, co;
  logic [N-1:0]  s;
  logic [NB-2:0] fe, cr, bl;

  int checks = 0, failures = 0, n_exact = 0, n_res = 0, n_corr = 0, n_bal = 0;
  longint max_err = 0;
  logic [N-1:0] qa[$], qb[$];
  logic         qc[$];
  int           qt[$];
  int cyc = 0;

  isa_pipelined dut (.clk, .rst_n, .in_valid, .a, .b, .cin, .out_valid(ov),
                     .sum(s), .cout(co), .fe, .corrected(cr), .balanced(bl));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NT + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n && ov) begin
      if (qa.size() == 0) begin
        failures++;
        $display("result with no operation in flight");
      end else begin
        logic [N-1:0] ea, eb;
        logic ec;
        int t;
        isa_res_t m;
        longint exact, got, err;
        ea = qa.pop_front(); eb = qb.pop_front(); ec = qc.pop_front(); t = qt.pop_front();
        m = isa_model(64'(ea), 64'(eb), ec, N, X, R, LB, BB, 1'b0);
        checks += 2;
        if (cyc - 1 - t != int'(LAT)) begin
          failures++;
          $display("latency %0d, expected %0d", cyc - 1 - t, LAT);
        end
        if (64'(s) != m.sum || co != m.cout || fe != m.fe[NB-2:0] ||
            cr != m.cor[NB-2:0] || bl != m.bal[NB-2:0]) begin
          failures++;
          $display("%h + %h + %b -> %h/%b, model %h/%b", ea, eb, ec, s, co, m.sum, m.cout);
        end
        exact = longint'(ea) + longint'(eb) + longint'(ec);
        got   = longint'({co, s});
        err   = (got > exact) ? got - exact : exact - got;
        if (err == 0) n_exact++;
        if (err > max_err) max_err = err;
        if (cr != '0) n_corr++;
        if (bl != '0) n_bal++;
        n_res++;
      end
    end
  end

  initial begin
    in_valid = 1'b0; a = '0; b = '0; cin = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < int'(NT); k++) begin
      in_valid = 1'b1;
      a = {8'($urandom), 8'(k)};
      b = {8'($urandom), 8'(k >> 8)};
      cin = k[0];
      @(posedge clk);
      qa.push_back(a); qb.push_back(b); qc.push_back(cin); qt.push_back(cyc);
      cyc++;
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (LAT + 3) begin
      @(posedge clk); cyc++;
    end
    checks++;
    if (qa.size() != 0 || n_res != int'(NT) || n_corr == 0 || n_bal == 0) begin
      failures++;
      $display("missing results or compensation never exercised");
    end
    $display("results=%0d exact=%0d corrected=%0d balanced=%0d max_abs_error=%0d",
             n_res, n_exact, n_corr, n_bal, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
