// tb_refu_sp: self-checking testbench of refu_sp.
//
// Part 1, one-entry replay buffer: issues ADD, MOV, SUB, MUL, MOV, CMP, ADD,
// ADD back to back and checks the cycle in which each instruction is taken
// and each re-execution starts against the unit schedule of the document's
// cycle-by-cycle example (primary ADD 0-1, SUB 4-5, MUL 6-8, CMP 10-11,
// ADD 12-13, ADD 16-17; re-executions ADD 2-3, SUB 6-7, MUL 9-11, CMP 12-13,
// ADD 14-15; MOVs taken in cycles 2 and 9).
//
// Part 2, default four-entry buffer: a random instruction stream from several
// warps. Every write-back is checked against the reference model, every ALU
// instruction must be compared exactly once, and no fault may be reported.
// Transient faults are then injected one at a time into a unit's result (in
// the primary or the redundant execution) or into a stored replay buffer
// result bit; each must produce exactly one fault pulse with the warp ID of
// the instruction hit (buffer upsets hit a stored result or flag bit). Finally a parity-covered bit is upset and the parity
// error must appear. The stall causes, re-executions and primary/redundant
// overlap are counted and each must occur; a primary result waiting for a
// buffer location is provoked on the one-entry buffer.
module tb_refu_sp;
  import refu_pkg::*;
  import refu_tb_ref::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL: %s", msg);
    end
  endtask

  data_t zero_mask [N_FU];
  initial for (int f = 0; f < N_FU; f++) zero_mask[f] = '0;

  // ------------------------------------------------------------------
  // Part 1: one-entry buffer, document example
  // ------------------------------------------------------------------
  logic             s_valid, s_ready, s_wb_valid, s_idle;
  issue_t           s_issue;
  warp_t            s_wb_warp, s_fw [N_FU];
  op_e              s_wb_op;
  data_t            s_wb_result;
  flags_t           s_wb_flags;
  logic [N_FU-1:0]  s_checked, s_fault;
  logic [0:0]       s_perr, s_slot;
  logic             s_ev_rs, s_ev_sf, s_ev_sr, s_ev_w;
  logic [1:0]       s_cnt;

  refu_sp #(.DEPTH(1)) dut1 (
    .clk, .rst_n, .issue_valid(s_valid), .issue(s_issue), .issue_ready(s_ready),
    .wb_valid(s_wb_valid), .wb_warp(s_wb_warp), .wb_op(s_wb_op), .wb_result(s_wb_result),
    .wb_flags(s_wb_flags), .checked(s_checked), .fault(s_fault), .fault_warp(s_fw),
    .parity_err(s_perr), .ev_replay_start(s_ev_rs), .ev_stall_fu_busy(s_ev_sf),
    .ev_stall_rb_full(s_ev_sr), .ev_wait_rb_space(s_ev_w), .rb_count(s_cnt), .idle(s_idle),
    .inj_mask(zero_mask), .rb_inj_en(1'b0), .rb_inj_slot(s_slot), .rb_inj_bit('0));
  assign s_slot = '0;

  // ------------------------------------------------------------------
  // Part 2: default buffer
  // ------------------------------------------------------------------
  logic             valid, ready, wb_valid, idle;
  issue_t           issue;
  warp_t            wb_warp, fw [N_FU];
  op_e              wb_op;
  data_t            wb_result;
  flags_t           wb_flags;
  logic [N_FU-1:0]  checked, fault;
  logic [3:0]       perr;
  logic             ev_rs, ev_sf, ev_sr, ev_w;
  logic [2:0]       cnt;
  data_t            inj [N_FU];
  logic             rb_inj_en;
  logic [1:0]       rb_inj_slot;
  logic [$clog2(RB_ENTRY_W)-1:0] rb_inj_bit;

  refu_sp dut (
    .clk, .rst_n, .issue_valid(valid), .issue(issue), .issue_ready(ready),
    .wb_valid, .wb_warp, .wb_op, .wb_result, .wb_flags, .checked, .fault, .fault_warp(fw),
    .parity_err(perr), .ev_replay_start(ev_rs), .ev_stall_fu_busy(ev_sf),
    .ev_stall_rb_full(ev_sr), .ev_wait_rb_space(ev_w), .rb_count(cnt), .idle,
    .inj_mask(inj), .rb_inj_en, .rb_inj_slot, .rb_inj_bit);

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ------------------------------------------------------------------
  // monitors of part 2
  // ------------------------------------------------------------------
  typedef struct { warp_t w; op_e op; data_t r; flags_t f; } exp_t;
  exp_t  exp_q [$];
  warp_t fault_exp [$];
  int    n_checked = 0, n_faults = 0, n_alu = 0, n_prim_hit = 0, n_wb_bad = 0;
  int    n_rs = 0, n_sf = 0, n_sr = 0, n_w = 0, n_overlap = 0, n_multi_done = 0;
  bit    phase2 = 0;

  always @(posedge clk) if (rst_n && phase2) begin
    if (wb_valid) begin
      exp_t e;
      check(exp_q.size() > 0, "write-back expected");
      if (exp_q.size() > 0) begin
        e = exp_q.pop_front();
        check(wb_warp == e.w && wb_op == e.op, "write-back warp and op in issue order");
        if (wb_result != e.r || (e.op != OP_MOV && wb_flags != e.f)) n_wb_bad++;
      end
    end
    n_checked += $countones(checked);
    for (int f = 0; f < N_FU; f++) if (fault[f]) begin
      int idx[$];
      n_faults++;
      idx = fault_exp.find_first_index(x) with (x == fw[f]);
      check(idx.size() > 0, $sformatf("fault on unit %0d with unexpected warp %0d", f, fw[f]));
      if (idx.size() > 0) fault_exp.delete(idx[0]);
    end
    n_rs += ev_rs; n_sf += ev_sf; n_sr += ev_sr; n_w += ev_w;
    begin
      bit p, r;
      p = 0; r = 0;
      for (int f = 0; f < N_FU; f++) if (dut.fu_busy[f]) begin
        if (dut.fu_tag[f][2]) r = 1; else p = 1;
      end
      if (p && r) n_overlap++;
      if ($countones(dut.fu_done) > 1) n_multi_done++;
    end
  end

  // offer an instruction from a falling edge on, until the SP takes it at a
  // rising edge; the next call starts after that edge
  task automatic send(issue_t ins);
    @(negedge clk);
    valid = 1; issue = ins;
    #1;
    while (!ready) begin
      @(negedge clk);
      #1;
    end
  endtask

  function automatic issue_t rand_ins();
    issue_t x;
    x.warp_id = warp_t'($urandom_range(MAX_WARPS - 1));
    x.op      = ($urandom_range(7) == 0) ? op_e'($urandom_range(1)) : rand_alu_op();
    x.a       = rand_operand();
    x.b       = rand_operand();
    return x;
  endfunction

  task automatic expect_ins(issue_t x);
    ref_out_t o;
    exp_t     e;
    if (x.op == OP_NOP) return;
    o = ref_exec(x.op, x.a, x.b);
    e.w = x.warp_id; e.op = x.op; e.r = o.result; e.f = o.flags;
    exp_q.push_back(e);
    if (op_uses_alu(x.op)) n_alu++;
  endtask

  // one transient fault: into a unit result as it completes, or into a
  // stored result or flag bit of a waiting buffer entry
  int n_inj_fu = 0, n_inj_rb = 0;
  bit inj_busy = 0, inj_on = 0;
  always @(negedge clk) if (rst_n && phase2) begin
    for (int f = 0; f < N_FU; f++) inj[f] <= '0;
    rb_inj_en <= 0;
    if (inj_on && !inj_busy && fault_exp.size() == 0 && $urandom_range(40) == 0) begin
      if ($urandom_range(1) == 0) begin
        for (int f = 0; f < N_FU; f++)
          if (!inj_busy && dut.fu_done[f] && (dut.fu_tag[f][2] || dut.rb_wr_ready)) begin
            inj_busy = 1;
            inj[f] <= data_t'(1) << $urandom_range(31);
            if (dut.fu_tag[f][2]) fault_exp.push_back(dut.rb_ent[dut.fu_tag[f][1:0]].warp_id);
            else begin fault_exp.push_back(dut.prim_warp_q); n_prim_hit++; end
            n_inj_fu++;
          end
      end else begin
        for (int s = 0; s < 4; s++)
          if (!inj_busy && dut.rb_ent[s].valid && !dut.rb_ent[s].reexec && !dut.rb_retire[s]) begin
            inj_busy = 1;
            rb_inj_en  <= 1;
            rb_inj_slot <= 2'(s);
            rb_inj_bit <= ($clog2(RB_ENTRY_W))'(3 + $urandom_range(35));   // a flag or result bit
            fault_exp.push_back(dut.rb_ent[s].warp_id);
            n_inj_rb++;
          end
      end
    end
    inj_busy = 0;
  end

  // ------------------------------------------------------------------
  // stimulus
  // ------------------------------------------------------------------
  int fire1 [$], replay1 [$];
  int n_w1 = 0;
  always @(posedge clk) if (rst_n) n_w1 += s_ev_w;
  int t0 = -1;
  always @(posedge clk) if (rst_n) begin
    if (s_valid && s_ready) begin
      if (t0 < 0) t0 = cycle;
      fire1.push_back(cycle - ((t0 < 0) ? cycle : t0));
    end
    if (s_ev_rs) replay1.push_back(cycle - t0);
  end

  initial begin
    op_e    prog1 [8] = '{OP_ADD, OP_MOV, OP_SUB, OP_MUL, OP_MOV, OP_CMPLT, OP_ADD, OP_ADD};
    int     want_fire [8]   = '{0, 2, 4, 6, 9, 10, 12, 16};
    int     want_replay [6] = '{2, 6, 9, 12, 14, 18};
    s_valid = 0; s_issue = '0; valid = 0; issue = '0;
    rb_inj_en = 0; rb_inj_slot = 0; rb_inj_bit = 0;
    for (int f = 0; f < N_FU; f++) inj[f] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---------------- part 1
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      s_valid = 1;
      s_issue = '{warp_id: warp_t'(i), op: prog1[i], a: 32'(i + 5), b: 32'(3)};
      #1;
      while (!s_ready) begin
        @(negedge clk);
        #1;
      end
    end
    @(negedge clk);
    s_valid = 0;
    repeat (12) @(negedge clk);
    check(fire1.size() == 8, "all example instructions taken");
    for (int i = 0; i < 8 && i < fire1.size(); i++)
      check(fire1[i] == want_fire[i],
            $sformatf("example: instruction %0d taken in cycle %0d, want %0d", i, fire1[i], want_fire[i]));
    check(replay1.size() == 6, $sformatf("example: %0d re-executions, want 6", replay1.size()));
    for (int i = 0; i < 6 && i < replay1.size(); i++)
      check(replay1[i] == want_replay[i],
            $sformatf("example: re-execution %0d starts in cycle %0d, want %0d", i, replay1[i], want_replay[i]));
    check(s_idle, "example drained");
    // MUL then ADD on the one-entry buffer: the ADD starts next to the MUL
    // re-execution, finishes first and must wait for the buffer location
    for (int i = 0; i < 2; i++) begin
      @(negedge clk);
      s_valid = 1;
      s_issue = '{warp_id: warp_t'(i), op: (i == 0) ? OP_MUL : OP_ADD, a: 32'd7, b: 32'd9};
      #1;
      while (!s_ready) begin
        @(negedge clk);
        #1;
      end
    end
    @(negedge clk);
    s_valid = 0;
    repeat (10) @(negedge clk);
    check(n_w1 > 0, "primary result waited for buffer space");
    check(s_idle, "one-entry SP drained");
    // ---------------- part 2, fault free
    phase2 = 1;
    for (int i = 0; i < 3000; i++) begin
      issue_t x;
      x = rand_ins();
      expect_ins(x);
      send(x);
    end
    @(negedge clk);
    valid = 0;
    repeat (20) @(negedge clk);
    check(idle && exp_q.size() == 0, "fault-free stream drained");
    check(n_wb_bad == 0, "fault-free write-backs all correct");
    check(n_faults == 0, "no fault reported without injection");
    check(n_checked == n_alu, "fault-free: every ALU instruction compared once");
    // ---------------- part 2, with injected faults
    inj_on = 1;
    for (int i = 0; i < 6000; i++) begin
      issue_t x;
      x = rand_ins();
      expect_ins(x);
      send(x);
    end
    @(negedge clk);
    valid = 0;
    inj_on = 0;
    repeat (20) @(negedge clk);
    check(idle, "SP drains");
    check(n_checked == n_alu, $sformatf("%0d comparisons for %0d ALU instructions", n_checked, n_alu));
    check(fault_exp.size() == 0, $sformatf("%0d injected faults not detected", fault_exp.size()));
    check(n_faults == n_inj_fu + n_inj_rb, "one fault per injection");
    check(n_wb_bad == n_prim_hit, "only primary hits corrupt write-back");
    // parity
    phase2 = 0;
    @(negedge clk);
    rb_inj_en = 1; rb_inj_slot = 2; rb_inj_bit = ($clog2(RB_ENTRY_W))'(RB_ENTRY_W - 1);  // warp ID MSB
    @(negedge clk);
    rb_inj_en = 0;
    check(perr[2], "parity error on warp ID upset");
    $display("events: replays=%0d stall_fu_busy=%0d stall_rb_full=%0d wait_rb_space=%0d overlap=%0d multi_done=%0d inj_fu=%0d inj_rb=%0d",
             n_rs, n_sf, n_sr, n_w, n_overlap, n_multi_done, n_inj_fu, n_inj_rb);
    check(n_rs > 0 && n_sf > 0 && n_sr > 0 && n_overlap > 0, "all mechanisms exercised");
    check(n_inj_fu > 10 && n_inj_rb > 10, "enough faults injected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
