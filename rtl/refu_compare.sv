// refu_compare: result comparison logic of REFU.
//
// When a re-execution finishes (`check` high), the result and flags it
// produced are compared with the result and flags that the primary execution
// stored in the replay buffer. Any difference means a transient fault struck
// the functional unit in one of the two executions, or a bit of the stored
// entry (operands, result, flags or instruction type) was upset while it
// waited. The outcome is registered: `fault` is a one-cycle pulse in the cycle
// after `check`, with the warp ID of the instruction, which recovery needs to
// re-run that warp from its last checkpoint. `checked` pulses alongside for
// every comparison made, faulty or not.
//
// Follows the document: comparison of stored primary result and flags with the
// re-execution result, and a fault signal as its output. Own choices: the
// registered one-cycle pulse and the warp ID carried with it.
module refu_compare
  import refu_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   check,
  input  warp_t  warp_id,
  input  data_t  stored_result,
  input  flags_t stored_flags,
  input  data_t  redo_result,
  input  flags_t redo_flags,
  output logic   checked,
  output logic   fault,
  output warp_t  fault_warp
);

  logic mismatch;
  assign mismatch = (stored_result != redo_result) || (stored_flags != redo_flags);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      checked    <= 1'b0;
      fault      <= 1'b0;
      fault_warp <= '0;
    end else begin
      checked <= check;
      fault   <= check && mismatch;
      if (check) fault_warp <= warp_id;
    end
  end

endmodule
