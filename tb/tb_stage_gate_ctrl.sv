// tb_stage_gate_ctrl: self-checking testbench of the stage clock-enable
// control.
//
// Drives a random valid pattern with bursts and gaps and compares every enable
// and out_valid with the input valid history: en[0] is the current valid, en[k]
// the valid of k cycles ago, out_valid the valid of STAGES+1 cycles ago. It
// also checks that reset empties the pipeline and that idle levels are gated
// (enable low) at the start and end of a burst.
module tb_stage_gate_ctrl;
  localparam int unsigned STAGES = 5;
  localparam int unsigned NT = 500;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid;
  logic [STAGES:0] en;
  logic out_valid;
  int checks = 0, failures = 0, gated = 0;
  logic hv[NT];

  stage_gate_ctrl dut (.clk, .rst_n, .in_valid, .en, .out_valid);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NT + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 1'b1;
    @(negedge clk);
    checks++;
    if (en[STAGES:1] != '0 || out_valid) begin
      failures++;
      $display("reset did not empty the pipeline");
    end
    rst_n = 1'b1;
    for (int k = 0; k < int'(NT); k++) begin
      // bursts of valid separated by idle gaps
      hv[k] = ((k / 20) % 2 == 0) ? 1'b1 : (($urandom % 4) == 0);
      in_valid = hv[k];
      #1;
      for (int s = 0; s <= int'(STAGES); s++) begin
        logic e;
        e = (k >= s) ? hv[k-s] : 1'b0;
        checks++;
        if (en[s] !== e) begin
          failures++;
          $display("cycle %0d en[%0d]=%b expected %b", k, s, en[s], e);
        end
        if (!e) gated++;
      end
      checks++;
      if (out_valid !== ((k >= int'(STAGES) + 1) ? hv[k-STAGES-1] : 1'b0)) begin
        failures++;
        $display("cycle %0d out_valid wrong", k);
      end
      @(negedge clk);
    end
    checks++;
    if (gated == 0) begin
      failures++;
      $display("no stage was ever gated");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
