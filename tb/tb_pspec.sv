// tb_pspec: self-checking testbench of the pipelined speculator.
//
// Two instances, one assuming a window carry-in of 0 (the default) and one of
// 1, are fed a new random 2-bit operand pair every clock. The expected carry is
// computed arithmetically, ((a + b + cin_assumed) >> R), and compared two
// clocks later. A final phase drops the stage enables and checks that the
// output holds.
module tb_pspec;
  localparam int unsigned R = 2;
  localparam int unsigned NT = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] en;
  logic [R-1:0] a, b;
  logic cso0, cso1;
  int checks = 0, failures = 0;

  logic [R-1:0] ha[NT], hb[NT];

  pspec #(.R(R))                 dut0 (.clk, .rst_n, .en, .a, .b, .cso(cso0));
  pspec #(.R(R), .SPEC_CIN(1'b1)) dut1 (.clk, .rst_n, .en, .a, .b, .cso(cso1));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NT + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic exp_carry(logic [R-1:0] x, logic [R-1:0] y, int c);
    int unsigned t = int'(x) + int'(y) + c;
    return logic'(t >> R);
  endfunction

  initial begin
    en = 2'b11; a = '0; b = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < int'(NT); k++) begin
      @(negedge clk);
      if (k >= 2) begin
        checks += 2;
        if (cso0 !== exp_carry(ha[k-2], hb[k-2], 0)) begin
          failures++;
          $display("cin0: a=%b b=%b got %b", ha[k-2], hb[k-2], cso0);
        end
        if (cso1 !== exp_carry(ha[k-2], hb[k-2], 1)) begin
          failures++;
          $display("cin1: a=%b b=%b got %b", ha[k-2], hb[k-2], cso1);
        end
      end
      // exhaustive first, random after
      ha[k] = (k < 16) ? R'(k) : R'($urandom);
      hb[k] = (k < 16) ? R'(k >> R) : R'($urandom);
      a = ha[k];
      b = hb[k];
    end
    // hold: both stages disabled, output must not move
    @(negedge clk);
    en = 2'b00;
    begin
      logic h0, h1;
      h0 = cso0; h1 = cso1;
      repeat (4) begin
        a = ~a; b = ~b;
        @(negedge clk);
        checks++;
        if (cso0 !== h0 || cso1 !== h1) begin
          failures++;
          $display("output moved while stages were disabled");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
