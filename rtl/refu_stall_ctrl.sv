// refu_stall_ctrl: issue stall and re-execution arbitration of one SP.
//
// Each cycle it decides (combinationally) whether the instruction offered by
// the pipeline may start, and which waiting replay buffer entry, if any, starts
// its re-execution, and on which sub functional unit.
//
// Rules:
//  * The SP executes one primary instruction at a time; the next one issues in
//    the cycle after the previous result was written (`prim_inflight`).
//    Instructions that use no ALU unit (MOV, NOP) issue without a unit.
//  * A waiting entry (valid, re-execute bit clear) is re-executed on its unit
//    when that unit is idle and either the primary instruction does not want
//    the unit this cycle, or the replay buffer is full. With a full buffer the
//    re-execution therefore wins the unit over the primary instruction.
//  * The primary ALU instruction stalls while its unit is busy or taken by a
//    re-execution this cycle, and while the buffer is full and still holds a
//    waiting entry for that same unit. The last rule guarantees that a primary
//    result waiting for buffer space can never block the re-execution that
//    would free the space.
//  * At most one re-execution starts per cycle; the lowest buffer location
//    wins.
//
// Follows the document: stalling the SP pipeline when the replay buffer is
// full or the functional unit is busy, and re-execution whenever a unit is
// free or the buffer is full; with a one-entry buffer these rules reproduce the
// unit occupancy of its cycle-by-cycle example. Own choices: one re-execution
// start per cycle, lowest-location-first selection, and the deadlock rule.
module refu_stall_ctrl
  import refu_pkg::*;
#(
  parameter int unsigned DEPTH  = 4,
  parameter int unsigned SLOT_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  // offered instruction
  input  logic              issue_valid,
  input  op_e               issue_op,
  input  logic              prim_inflight,
  // unit and buffer state
  input  logic [N_FU-1:0]   fu_busy,
  input  logic [DEPTH-1:0]  rb_valid,
  input  logic [DEPTH-1:0]  rb_reexec,
  input  op_e               rb_op [DEPTH],
  input  logic              rb_full,
  // decisions
  output logic              issue_ready,
  output logic              prim_start,
  output logic              red_start,
  output logic [SLOT_W-1:0] red_slot,
  // stall causes, for monitoring
  output logic              stall_fu_busy,
  output logic              stall_rb_full
);

  logic prim_alu, prim_wants;
  fu_e  prim_fu;
  assign prim_alu   = op_uses_alu(issue_op);
  assign prim_fu    = op_fu(issue_op);
  assign prim_wants = issue_valid && !prim_inflight && prim_alu;

  fu_e  red_fu;
  logic rb_block;

  always_comb begin
    red_start = 1'b0;
    red_slot  = '0;
    red_fu    = FU_COMP;
    rb_block  = 1'b0;
    for (int s = 0; s < DEPTH; s++) begin
      fu_e fs;
      fs = op_fu(rb_op[s]);
      if (rb_valid[s] && !rb_reexec[s]) begin
        if (rb_full && prim_wants && fs == prim_fu) rb_block = 1'b1;
        if (!red_start && !fu_busy[fs] &&
            (!prim_wants || fs != prim_fu || rb_full)) begin
          red_start = 1'b1;
          red_slot  = SLOT_W'(s);
          red_fu    = fs;
        end
      end
    end
  end

  logic fu_taken;
  assign fu_taken   = fu_busy[prim_fu] || (red_start && red_fu == prim_fu);
  assign prim_start = prim_wants && !fu_taken && !rb_block;

  assign issue_ready   = issue_valid && !prim_inflight && (prim_alu ? prim_start : 1'b1);
  assign stall_rb_full = prim_wants && rb_block;
  assign stall_fu_busy = prim_wants && fu_taken && !rb_block;

endmodule
