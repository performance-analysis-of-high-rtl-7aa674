// tb_pcla: self-checking testbench of the 4-bit pipelined carry look-ahead
// adder.
//
// Every clock a new operand pair enters; its carry-in is driven one clock
// later, as the adder expects. {cout, s} is compared with a + b + cin two
// clocks after the operands. All 512 operand/carry combinations are applied,
// then random ones. A 2-bit-wide instance exercises the width parameter. A
// final phase checks that a disabled pipeline holds its output.
module tb_pcla;
  localparam int unsigned X  = 4;
  localparam int unsigned NT = 900;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] en;
  logic [X-1:0] a, b, s;
  logic cin, cout;
  logic [1:0] s2;
  logic cout2;
  int checks = 0, failures = 0;

  logic [X-1:0] ha[NT], hb[NT];
  logic         hc[NT];

  pcla #(.X(X)) dut  (.clk, .rst_n, .en, .a, .b, .cin, .s, .cout);
  pcla #(.X(2)) dut2 (.clk, .rst_n, .en, .a(a[1:0]), .b(b[1:0]), .cin, .s(s2), .cout(cout2));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NT + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 2'b11; a = '0; b = '0; cin = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < int'(NT); k++) begin
      @(negedge clk);
      if (k >= 2) begin
        int unsigned e, e2;
        e  = int'(ha[k-2]) + int'(hb[k-2]) + int'(hc[k-2]);
        e2 = int'(ha[k-2][1:0]) + int'(hb[k-2][1:0]) + int'(hc[k-2]);
        checks += 2;
        if ({cout, s} !== (X+1)'(e)) begin
          failures++;
          $display("%0d + %0d + %0d: got %0d", ha[k-2], hb[k-2], hc[k-2], {cout, s});
        end
        if ({cout2, s2} !== 3'(e2)) begin
          failures++;
          $display("2-bit: got %0d expected %0d", {cout2, s2}, e2);
        end
      end
      if (k < 512) begin
        ha[k] = X'(k); hb[k] = X'(k >> X); hc[k] = k[2*X];
      end else begin
        ha[k] = X'($urandom); hb[k] = X'($urandom); hc[k] = 1'($urandom);
      end
      a   = ha[k];
      b   = hb[k];
      cin = (k >= 1) ? hc[k-1] : 1'b0;
    end
    @(negedge clk);
    en = 2'b00;
    begin
      logic [X:0] h;
      h = {cout, s};
      repeat (4) begin
        a = ~a; cin = ~cin;
        @(negedge clk);
        checks++;
        if ({cout, s} !== h) begin
          failures++;
          $display("output moved while stages were disabled");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
