// refu_sm_exec: the execution stage of one streaming multiprocessor (SM) with
// REFU fault detection on its SP units.
//
// The SM's issue logic hands each SP unit its own instruction stream; every
// SP unit (refu_sp) executes it, keeps its ALU instructions in its own replay
// buffer, re-executes them on idle functional units and compares. This module
// places N_SP such units side by side and merges their fault reports into one
// SM fault signal: `fault` pulses when any unit of any SP detected a result
// mismatch or any replay buffer location has a parity error, and `fault_warp`
// carries the warp ID of the mismatch on the lowest-numbered SP and unit
// (recovery re-executes that warp from its checkpoint). The per-SP signals are
// brought out as well.
//
// The parts of the SM that REFU does not change (fetch, decode, instruction
// buffer, issue logic, register file, SFU, LD/ST unit, caches) are outside
// this module: its issue ports take what the issue logic and register file
// would deliver, and its write-back ports go back to the register file.
//
// Interface and timing per SP are those of refu_sp. `fault` and `fault_warp`
// are combinational merges of the per-SP registered outputs.
//
// Follows the document: two SP units per SM in the evaluated configuration and
// the per-SP replay buffer / compare / fault signal. Own choices: independent
// issue ports per SP and the merged SM fault signal.
module refu_sm_exec
  import refu_pkg::*;
#(
  parameter int unsigned N_SP   = 2,
  parameter int unsigned DEPTH  = 4,
  parameter int unsigned SLOT_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // issue, one port per SP
  input  logic  [N_SP-1:0]  issue_valid,
  input  issue_t            issue       [N_SP],
  output logic  [N_SP-1:0]  issue_ready,
  // write-back to the register file
  output logic  [N_SP-1:0]  wb_valid,
  output warp_t             wb_warp     [N_SP],
  output op_e               wb_op       [N_SP],
  output data_t             wb_result   [N_SP],
  output flags_t            wb_flags    [N_SP],
  // fault detection
  output logic              fault,
  output warp_t             fault_warp,
  output logic [N_FU-1:0]   sp_fault    [N_SP],
  output logic [N_FU-1:0]   sp_checked  [N_SP],
  output logic [DEPTH-1:0]  sp_parity_err [N_SP],
  // monitoring
  output logic  [N_SP-1:0]  ev_replay_start,
  output logic  [N_SP-1:0]  ev_stall_fu_busy,
  output logic  [N_SP-1:0]  ev_stall_rb_full,
  output logic  [N_SP-1:0]  ev_wait_rb_space,
  output logic [SLOT_W:0]   rb_count    [N_SP],
  output logic              idle,
  // test-only fault models
  input  data_t             inj_mask    [N_SP][N_FU],
  input  logic  [N_SP-1:0]  rb_inj_en,
  input  logic [SLOT_W-1:0] rb_inj_slot [N_SP],
  input  logic [$clog2(RB_ENTRY_W)-1:0] rb_inj_bit [N_SP]
);

  warp_t           sp_fault_warp [N_SP][N_FU];
  logic [N_SP-1:0] sp_idle;

  for (genvar p = 0; p < N_SP; p++) begin : g_sp
    refu_sp #(.DEPTH(DEPTH), .SLOT_W(SLOT_W)) u_sp (
      .clk              (clk),
      .rst_n            (rst_n),
      .issue_valid      (issue_valid[p]),
      .issue            (issue[p]),
      .issue_ready      (issue_ready[p]),
      .wb_valid         (wb_valid[p]),
      .wb_warp          (wb_warp[p]),
      .wb_op            (wb_op[p]),
      .wb_result        (wb_result[p]),
      .wb_flags         (wb_flags[p]),
      .checked          (sp_checked[p]),
      .fault            (sp_fault[p]),
      .fault_warp       (sp_fault_warp[p]),
      .parity_err       (sp_parity_err[p]),
      .ev_replay_start  (ev_replay_start[p]),
      .ev_stall_fu_busy (ev_stall_fu_busy[p]),
      .ev_stall_rb_full (ev_stall_rb_full[p]),
      .ev_wait_rb_space (ev_wait_rb_space[p]),
      .rb_count         (rb_count[p]),
      .idle             (sp_idle[p]),
      .inj_mask         (inj_mask[p]),
      .rb_inj_en        (rb_inj_en[p]),
      .rb_inj_slot      (rb_inj_slot[p]),
      .rb_inj_bit       (rb_inj_bit[p])
    );
  end

  always_comb begin
    fault      = 1'b0;
    fault_warp = '0;
    for (int p = N_SP - 1; p >= 0; p--) begin
      for (int f = N_FU - 1; f >= 0; f--) begin
        if (sp_fault[p][f]) begin
          fault      = 1'b1;
          fault_warp = sp_fault_warp[p][f];
        end
      end
      if (|sp_parity_err[p]) fault = 1'b1;
    end
  end

  assign idle = &sp_idle;

endmodule
