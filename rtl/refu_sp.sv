// refu_sp: one streaming processor (SP) with REFU fault detection.
//
// The SP executes the instructions the pipeline issues to it, one thread's
// worth of dependency-resolved operands at a time, on the six sub functional
// units of its ALU (refu_alu). An ALU instruction, once its primary execution
// is over, is written back and at the same time stored with operands, result
// and flags in the replay buffer (refu_replay_buffer). The stall controller
// (refu_stall_ctrl) re-executes buffered instructions on whichever unit is
// idle, or takes a unit from the primary stream when the buffer is full. A
// comparator per unit (refu_compare) checks each re-execution against the
// stored result and flags and raises a fault with the warp ID on a mismatch;
// the entry is then retired. MOV and NOP use no ALU unit and are not stored.
//
// Interface and timing:
//  * issue_valid/issue/issue_ready: valid-ready handshake; the instruction is
//    taken in a cycle with both high. The SP holds one primary instruction at
//    a time, so the next one is taken at the earliest in the cycle after the
//    previous result was written.
//  * wb_*: registered; one-cycle pulse in the cycle after an ALU result leaves
//    its unit (i.e. LATENCY cycles after issue when nothing stalls), or in the
//    cycle after a MOV was taken. Results are written back before they are
//    verified; recovery relies on the fault signal.
//  * fault[f]/fault_warp[f]: pulse in the cycle after a re-execution on unit f
//    finished with a result or flags differing from the stored ones.
//    checked[f] pulses for every comparison.
//  * parity_err: level, a replay buffer location whose warp ID / valid /
//    re-execute bits fail their parity.
//  * ev_*: one-cycle event strobes for monitoring; idle: nothing in flight and
//    the replay buffer empty.
//  * inj_mask / rb_inj_*: test-only fault models (unit result upset, buffer
//    bit upset); tie to zero in use.
//
// Follows the document: the replay buffer / SP / compare / fault signal
// structure, storing results with operands for re-execution, re-execution on
// idle units or when the buffer is full, and no re-execution for MOV and NOP.
// Own choices: one primary instruction in flight (as in the document's
// cycle-by-cycle example), the handshake, registered write-back and the
// per-unit fault outputs.
module refu_sp
  import refu_pkg::*;
#(
  parameter int unsigned DEPTH  = 4,
  parameter int unsigned SLOT_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // issue
  input  logic              issue_valid,
  input  issue_t            issue,
  output logic              issue_ready,
  // write-back
  output logic              wb_valid,
  output warp_t             wb_warp,
  output op_e               wb_op,
  output data_t             wb_result,
  output flags_t            wb_flags,
  // fault detection
  output logic [N_FU-1:0]   checked,
  output logic [N_FU-1:0]   fault,
  output warp_t             fault_warp [N_FU],
  output logic [DEPTH-1:0]  parity_err,
  // monitoring
  output logic              ev_replay_start,
  output logic              ev_stall_fu_busy,
  output logic              ev_stall_rb_full,
  output logic              ev_wait_rb_space,
  output logic [SLOT_W:0]   rb_count,
  output logic              idle,
  // test-only fault models
  input  data_t             inj_mask [N_FU],
  input  logic              rb_inj_en,
  input  logic [SLOT_W-1:0] rb_inj_slot,
  input  logic [$clog2(RB_ENTRY_W)-1:0] rb_inj_bit
);

  localparam int unsigned TAG_W = SLOT_W + 1;   // {replay, slot}

  // ------------------------------------------------------------------
  // Replay buffer
  // ------------------------------------------------------------------
  rb_entry_t        rb_ent [DEPTH];
  logic             rb_full, rb_wr_ready, rb_wr_en;
  logic [DEPTH-1:0] rb_retire, rb_valid, rb_reexec;
  op_e              rb_op [DEPTH];
  warp_t            prim_warp_q;

  // ------------------------------------------------------------------
  // ALU and control signals
  // ------------------------------------------------------------------
  logic              prim_start, red_start, prim_inflight;
  logic [SLOT_W-1:0] red_slot;
  logic [N_FU-1:0]   fu_busy, fu_done, fu_accept;
  data_t             fu_result [N_FU];
  flags_t            fu_flags  [N_FU];
  logic [TAG_W-1:0]  fu_tag    [N_FU];

  for (genvar s = 0; s < DEPTH; s++) begin : g_rb_view
    assign rb_valid[s]  = rb_ent[s].valid;
    assign rb_reexec[s] = rb_ent[s].reexec;
    assign rb_op[s]     = rb_ent[s].op;
  end

  refu_stall_ctrl #(.DEPTH(DEPTH), .SLOT_W(SLOT_W)) u_ctrl (
    .issue_valid   (issue_valid),
    .issue_op      (issue.op),
    .prim_inflight (prim_inflight),
    .fu_busy       (fu_busy),
    .rb_valid      (rb_valid),
    .rb_reexec     (rb_reexec),
    .rb_op         (rb_op),
    .rb_full       (rb_full),
    .issue_ready   (issue_ready),
    .prim_start    (prim_start),
    .red_start     (red_start),
    .red_slot      (red_slot),
    .stall_fu_busy (ev_stall_fu_busy),
    .stall_rb_full (ev_stall_rb_full)
  );

  refu_alu #(.TAG_W(TAG_W)) u_alu (
    .clk        (clk),
    .rst_n      (rst_n),
    .prim_start (prim_start),
    .prim_op    (issue.op),
    .prim_a     (issue.a),
    .prim_b     (issue.b),
    .prim_tag   ('0),
    .red_start  (red_start),
    .red_op     (rb_ent[red_slot].op),
    .red_a      (rb_ent[red_slot].a),
    .red_b      (rb_ent[red_slot].b),
    .red_tag    ({1'b1, red_slot}),
    .fu_busy    (fu_busy),
    .fu_done    (fu_done),
    .fu_result  (fu_result),
    .fu_flags   (fu_flags),
    .fu_tag     (fu_tag),
    .fu_accept  (fu_accept),
    .inj_mask   (inj_mask)
  );

  // ------------------------------------------------------------------
  // Completions: primary results go to write-back and the buffer, replay
  // results to their comparator.
  // ------------------------------------------------------------------
  logic   prim_done;
  op_e    prim_op_q;
  data_t  prim_res, prim_a_q, prim_b_q;
  flags_t prim_flags;

  always_comb begin
    prim_done  = 1'b0;
    prim_res   = '0;
    prim_flags = '0;
    rb_retire  = '0;
    fu_accept  = '0;
    for (int f = 0; f < N_FU; f++) begin
      if (fu_done[f]) begin
        if (fu_tag[f][SLOT_W]) begin
          fu_accept[f]                    = 1'b1;
          rb_retire[fu_tag[f][SLOT_W-1:0]] = 1'b1;
        end else begin
          prim_done  = 1'b1;
          prim_res   = fu_result[f];
          prim_flags = fu_flags[f];
          fu_accept[f] = rb_wr_ready;
        end
      end
    end
  end
  assign rb_wr_en         = prim_done && rb_wr_ready;
  assign ev_wait_rb_space = prim_done && !rb_wr_ready;
  assign ev_replay_start  = red_start;

  refu_replay_buffer #(.DEPTH(DEPTH), .SLOT_W(SLOT_W)) u_rb (
    .clk        (clk),
    .rst_n      (rst_n),
    .wr_en      (rb_wr_en),
    .wr_warp    (prim_warp_q),
    .wr_op      (prim_op_q),
    .wr_a       (prim_a_q),
    .wr_b       (prim_b_q),
    .wr_result  (prim_res),
    .wr_flags   (prim_flags),
    .wr_ready   (rb_wr_ready),
    .start_en   (red_start),
    .start_slot (red_slot),
    .retire     (rb_retire),
    .entries    (rb_ent),
    .full       (rb_full),
    .count      (rb_count),
    .parity_err (parity_err),
    .inj_en     (rb_inj_en),
    .inj_slot   (rb_inj_slot),
    .inj_bit    (rb_inj_bit)
  );

  for (genvar f = 0; f < N_FU; f++) begin : g_cmp
    logic [SLOT_W-1:0] slot;
    assign slot = fu_tag[f][SLOT_W-1:0];
    refu_compare u_cmp (
      .clk           (clk),
      .rst_n         (rst_n),
      .check         (fu_done[f] && fu_tag[f][SLOT_W]),
      .warp_id       (rb_ent[slot].warp_id),
      .stored_result (rb_ent[slot].result),
      .stored_flags  (rb_ent[slot].flags),
      .redo_result   (fu_result[f]),
      .redo_flags    (fu_flags[f]),
      .checked       (checked[f]),
      .fault         (fault[f]),
      .fault_warp    (fault_warp[f])
    );
  end

  // ------------------------------------------------------------------
  // Primary instruction in flight, and write-back
  // ------------------------------------------------------------------
  logic issue_fire;
  assign issue_fire = issue_valid && issue_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prim_inflight <= 1'b0;
      prim_warp_q   <= '0;
      prim_op_q     <= OP_NOP;
      prim_a_q      <= '0;
      prim_b_q      <= '0;
      wb_valid      <= 1'b0;
      wb_warp       <= '0;
      wb_op         <= OP_NOP;
      wb_result     <= '0;
      wb_flags      <= '0;
    end else begin
      wb_valid <= 1'b0;
      if (prim_start) begin
        prim_inflight <= 1'b1;
        prim_warp_q   <= issue.warp_id;
        prim_op_q     <= issue.op;
        prim_a_q      <= issue.a;
        prim_b_q      <= issue.b;
      end else if (rb_wr_en) begin
        prim_inflight <= 1'b0;
      end
      if (rb_wr_en) begin
        wb_valid  <= 1'b1;
        wb_warp   <= prim_warp_q;
        wb_op     <= prim_op_q;
        wb_result <= prim_res;
        wb_flags  <= prim_flags;
      end else if (issue_fire && issue.op == OP_MOV) begin
        wb_valid  <= 1'b1;
        wb_warp   <= issue.warp_id;
        wb_op     <= OP_MOV;
        wb_result <= issue.a;
        wb_flags  <= '0;
      end
    end
  end

  assign idle = !prim_inflight && (rb_count == '0);

  a_one_primary: assert property (@(posedge clk) disable iff (!rst_n)
                                  prim_start |-> !prim_inflight)
    else $error("refu_sp: second primary instruction in flight");

endmodule
