// stage_gate_ctrl: clock-enable control for the adder pipeline.
//
// Tracks which of the register levels L0..L(STAGES) hold a live operation by
// shifting the input valid bit down a chain of flags. Level 0 loads when a new
// operation is offered; level k (k >= 1) loads only when level k-1 holds a live
// operation. A level with nothing to load therefore sees no clock edge, which
// saves switching power while the pipeline fills at the start of a burst of
// additions and drains at its end. en[k] is the enable (gated clock) of level
// k; synthesis maps each to a clock-gating cell. out_valid marks the output
// level.
//
// Timing: en[0] = in_valid combinationally; en[k] is the registered live flag
// of level k-1. Reset is asynchronous, active low, and empties the pipeline.
//
// Gating idle stages follows the source design; the valid-chain control that
// decides when a stage is idle is this design's own.
module stage_gate_ctrl #(
  parameter int unsigned STAGES = isa_pkg::ISA_STAGES
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,  // a new operation is offered this cycle
  output logic [STAGES:0] en,        // enable of register levels 0..STAGES
  output logic            out_valid  // the output level holds a live result
);

  logic [STAGES:0] live_q;   // live_q[k]: level k holds a live operation

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) live_q <= '0;
    else        live_q <= {live_q[STAGES-1:0], in_valid};
  end

  assign en        = {live_q[STAGES-1:0], in_valid};
  assign out_valid = live_q[STAGES];

endmodule
