// nemo_trigger: NEMO notify stage ("trigger unit").
//
// After every state update the new value is compared with the configured
// operand using the configured predicate (==, >=, >, <, <=); when the
// predicate holds, `irq` pulses for one cycle. CMP_NONE disables the stage.
// The pipeline turns the pulse into a sticky, per-pipeline interrupt that
// tags which pipeline fired.
//
// Timing: `upd_valid`/`upd_state` in cycle t, `irq` registered in t+1.
//
// From the design: the predicate set and "raise an interrupt when it holds".
// This design's choice: one comparison per update, registered output.
module nemo_trigger
  import nemo_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  cmp_op_e            op,
  input  logic [STATE_W-1:0] operand,
  input  logic               upd_valid,
  input  logic [STATE_W-1:0] upd_state,
  output logic               irq
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) irq <= 1'b0;
    else        irq <= upd_valid && compare(op, upd_state, operand);
  end

endmodule
