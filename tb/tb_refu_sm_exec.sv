// tb_refu_sm_exec: end-to-end testbench of the SM execution stage at its
// default configuration (two SP units, four-entry replay buffers).
//
// Both SPs receive independent random instruction streams from many warps,
// including MOV and NOP, which bypass the ALU and the replay buffer. Every
// write-back is checked against the reference model in issue order, and every
// ALU instruction must be compared exactly once. A fault-free phase must
// report no fault. In a second phase single transient faults are injected into
// unit results (primary or redundant execution) of either SP; each must raise
// the SM fault signal with the warp ID of the instruction hit. A parity upset
// in a replay buffer must raise it too. The mechanisms (re-execution, overlap
// of primary and redundant execution on different units, stall on a busy
// unit, stall on a full buffer, ALU bypass, fault and parity detection) are
// counted, and one that never happened counts as a failure.
module tb_refu_sm_exec;
  import refu_pkg::*;
  import refu_tb_ref::*;

  localparam int N_SP  = 2;
  localparam int DEPTH = 4;
  localparam int N_INS = 4000;   // instructions per SP and phase

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

  logic [N_SP-1:0]  issue_valid, issue_ready, wb_valid;
  issue_t           issue [N_SP];
  warp_t            wb_warp [N_SP];
  op_e              wb_op [N_SP];
  data_t            wb_result [N_SP];
  flags_t           wb_flags [N_SP];
  logic             fault, idle;
  warp_t            fault_warp;
  logic [N_FU-1:0]  sp_fault [N_SP], sp_checked [N_SP];
  logic [DEPTH-1:0] sp_parity_err [N_SP];
  logic [N_SP-1:0]  ev_replay_start, ev_stall_fu_busy, ev_stall_rb_full, ev_wait_rb_space;
  logic [2:0]       rb_count [N_SP];
  data_t            inj_mask [N_SP][N_FU];
  logic [N_SP-1:0]  rb_inj_en;
  logic [1:0]       rb_inj_slot [N_SP];
  logic [$clog2(RB_ENTRY_W)-1:0] rb_inj_bit [N_SP];

  refu_sm_exec dut (.*);

  // internal state of each SP, for the injector and the overlap counter
  logic [N_FU-1:0] x_busy [N_SP], x_done [N_SP];
  logic [2:0]      x_tag  [N_SP][N_FU];
  logic            x_wr_ready [N_SP];
  warp_t           x_prim_warp [N_SP];
  warp_t           x_rb_warp [N_SP][DEPTH];
  for (genvar p = 0; p < N_SP; p++) begin : g_peek
    assign x_busy[p]      = dut.g_sp[p].u_sp.fu_busy;
    assign x_done[p]      = dut.g_sp[p].u_sp.fu_done;
    assign x_wr_ready[p]  = dut.g_sp[p].u_sp.rb_wr_ready;
    assign x_prim_warp[p] = dut.g_sp[p].u_sp.prim_warp_q;
    for (genvar f = 0; f < N_FU; f++) begin : g_f
      assign x_tag[p][f] = dut.g_sp[p].u_sp.fu_tag[f];
    end
    for (genvar s = 0; s < DEPTH; s++) begin : g_s
      assign x_rb_warp[p][s] = dut.g_sp[p].u_sp.rb_ent[s].warp_id;
    end
  end

  // ------------------------------------------------------------------
  // scoreboard
  // ------------------------------------------------------------------
  typedef struct { warp_t w; op_e op; data_t r; flags_t f; } exp_t;
  exp_t  exp_q [N_SP][$];
  warp_t fault_exp [$];
  int n_alu [N_SP], n_bypass [N_SP], n_checked [N_SP];
  int n_faults = 0, n_parity = 0, n_wb_bad = 0, n_prim_hit = 0, n_inj = 0;
  int n_rs = 0, n_sf = 0, n_sr = 0, n_overlap = 0;
  bit inj_on = 0;

  initial for (int p = 0; p < N_SP; p++) begin
    n_alu[p] = 0; n_bypass[p] = 0; n_checked[p] = 0;
  end

  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < N_SP; p++) begin
      if (wb_valid[p]) begin
        exp_t e;
        check(exp_q[p].size() > 0, "write-back expected");
        if (exp_q[p].size() > 0) begin
          e = exp_q[p].pop_front();
          check(wb_warp[p] == e.w && wb_op[p] == e.op, $sformatf("SP%0d write-back order", p));
          if (wb_result[p] != e.r || (e.op != OP_MOV && wb_flags[p] != e.f)) n_wb_bad++;
        end
      end
      n_checked[p] += $countones(sp_checked[p]);
      n_rs += ev_replay_start[p];
      n_sf += ev_stall_fu_busy[p];
      n_sr += ev_stall_rb_full[p];
    end
    if (fault && !(|sp_parity_err[0]) && !(|sp_parity_err[1])) begin
      int idx[$];
      n_faults++;
      idx = fault_exp.find_first_index(x) with (x == fault_warp);
      check(idx.size() > 0, $sformatf("SM fault with unexpected warp %0d", fault_warp));
      if (idx.size() > 0) fault_exp.delete(idx[0]);
    end
    if (|sp_parity_err[0] || |sp_parity_err[1]) n_parity++;
    for (int p = 0; p < N_SP; p++) begin
      bit pr, rd;
      pr = 0; rd = 0;
      for (int f = 0; f < N_FU; f++) if (x_busy[p][f]) begin
        if (x_tag[p][f][2]) rd = 1; else pr = 1;
      end
      if (pr && rd) n_overlap++;
    end
  end

  // single transient fault into a finishing unit of a random SP
  always @(negedge clk) if (rst_n) begin
    for (int p = 0; p < N_SP; p++)
      for (int f = 0; f < N_FU; f++) inj_mask[p][f] <= '0;
    if (inj_on && fault_exp.size() == 0 && $urandom_range(30) == 0) begin
      int p;
      bit done;
      p = $urandom_range(N_SP - 1);
      done = 0;
      for (int f = 0; f < N_FU; f++)
        if (!done && x_done[p][f] &&
            (x_tag[p][f][2] || x_wr_ready[p])) begin
          done = 1;
          inj_mask[p][f] <= data_t'(1) << $urandom_range(31);
          if (x_tag[p][f][2])
            fault_exp.push_back(x_rb_warp[p][x_tag[p][f][1:0]]);
          else begin
            fault_exp.push_back(x_prim_warp[p]);
            n_prim_hit++;
          end
          n_inj++;
        end
    end
  end

  // ------------------------------------------------------------------
  // drivers
  // ------------------------------------------------------------------
  task automatic drive(int p, int n);
    for (int i = 0; i < n; i++) begin
      issue_t   x;
      ref_out_t o;
      exp_t     e;
      x.warp_id = warp_t'($urandom_range(MAX_WARPS - 1));
      x.op      = ($urandom_range(7) == 0) ? op_e'($urandom_range(1)) : rand_alu_op();
      x.a       = rand_operand();
      x.b       = rand_operand();
      if (x.op != OP_NOP) begin
        o = ref_exec(x.op, x.a, x.b);
        e.w = x.warp_id; e.op = x.op; e.r = o.result; e.f = o.flags;
        exp_q[p].push_back(e);
      end
      if (op_uses_alu(x.op)) n_alu[p]++; else n_bypass[p]++;
      @(negedge clk);
      // occasional bubble in the stream
      while ($urandom_range(9) == 0) begin
        issue_valid[p] = 0;
        @(negedge clk);
      end
      issue_valid[p] = 1; issue[p] = x;
      #1;
      while (!issue_ready[p]) begin
        @(negedge clk);
        #1;
      end
    end
    @(negedge clk);
    issue_valid[p] = 0;
  endtask

  task automatic drain();
    int t = 0;
    while (!(idle && exp_q[0].size() == 0 && exp_q[1].size() == 0) && t < 200) begin
      @(negedge clk);
      t++;
    end
    repeat (3) @(negedge clk);
    check(idle, "SM drains");
  endtask

  initial begin
    issue_valid = '0; rb_inj_en = '0;
    for (int p = 0; p < N_SP; p++) begin
      issue[p] = '0; rb_inj_slot[p] = '0; rb_inj_bit[p] = '0;
      for (int f = 0; f < N_FU; f++) inj_mask[p][f] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---------------- fault-free phase
    fork
      drive(0, N_INS);
      drive(1, N_INS);
    join
    drain();
    check(n_faults == 0 && n_parity == 0, "no fault without injection");
    check(n_wb_bad == 0, "all write-backs correct");
    for (int p = 0; p < N_SP; p++)
      check(n_checked[p] == n_alu[p],
            $sformatf("SP%0d: %0d comparisons for %0d ALU instructions", p, n_checked[p], n_alu[p]));
    // ---------------- phase with injected transient faults
    inj_on = 1;
    fork
      drive(0, N_INS);
      drive(1, N_INS);
    join
    inj_on = 0;
    drain();
    check(fault_exp.size() == 0, $sformatf("%0d injected faults not detected", fault_exp.size()));
    check(n_faults == n_inj, $sformatf("%0d SM faults for %0d injections", n_faults, n_inj));
    check(n_wb_bad == n_prim_hit, "only primary hits corrupt write-back");
    for (int p = 0; p < N_SP; p++)
      check(n_checked[p] == n_alu[p], $sformatf("SP%0d: every ALU instruction compared", p));
    // ---------------- parity upset of a warp ID in SP 1
    @(negedge clk);
    rb_inj_en[1] = 1; rb_inj_slot[1] = 2'd1; rb_inj_bit[1] = ($clog2(RB_ENTRY_W))'(RB_ENTRY_W - 2);
    @(negedge clk);
    rb_inj_en[1] = 0;
    #1;
    check(fault && sp_parity_err[1][1], "parity upset raises the SM fault signal");
    @(negedge clk);
    $display("events: alu=%0d/%0d bypass=%0d/%0d replays=%0d overlap=%0d stall_fu_busy=%0d stall_rb_full=%0d faults=%0d injections=%0d parity_cycles=%0d",
             n_alu[0], n_alu[1], n_bypass[0], n_bypass[1], n_rs, n_overlap, n_sf, n_sr,
             n_faults, n_inj, n_parity);
    check(n_rs > 0,                     "re-execution happened");
    check(n_overlap > 0,                "primary and redundant execution overlapped");
    check(n_sf > 0,                     "stall on busy unit happened");
    check(n_sr > 0,                     "stall on full replay buffer happened");
    check(n_bypass[0] + n_bypass[1] > 0, "ALU bypass (MOV/NOP) happened");
    check(n_inj > 10 && n_faults > 10,  "fault detection happened");
    check(n_parity > 0,                 "parity detection happened");
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
