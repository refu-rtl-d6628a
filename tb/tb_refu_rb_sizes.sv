// tb_refu_rb_sizes: cost of REFU against replay buffer size.
//
// Four SPs with replay buffers of 1, 2, 3 and 4 entries run the same
// instruction streams back to back. The cycles each needs are compared with
// the cycles the same stream takes without re-execution, where each ALU
// instruction occupies its unit for its latency and MOV/NOP take one cycle.
// Two mixes are run: ALU-heavy (7 of 8 instructions use the ALU) and
// half ALU / half MOV-NOP (standing in for the memory and move instructions
// that REFU does not re-execute). Checks: every write-back is correct, every
// ALU instruction is compared once, no SP is faster than the stream without
// re-execution, and larger buffers are never slower than the one-entry
// buffer. The relative throughput (normal cycles / REFU cycles, in percent)
// is printed per size.
module tb_refu_rb_sizes;
  import refu_pkg::*;
  import refu_tb_ref::*;

  localparam int N_CFG = 4;
  localparam int N_INS = 3000;

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

  data_t  zero_mask [N_FU];
  initial for (int f = 0; f < N_FU; f++) zero_mask[f] = '0;

  issue_t prog [N_INS];
  logic   [N_CFG-1:0] valid, ready, wb_valid, idle;
  issue_t issue [N_CFG];
  data_t  wb_result [N_CFG];
  op_e    wb_op [N_CFG];
  logic [N_FU-1:0] checked [N_CFG];
  int     n_wb [N_CFG], n_bad [N_CFG], n_chk [N_CFG];

  for (genvar d = 0; d < N_CFG; d++) begin : g_cfg
    localparam int DEPTH  = d + 1;
    localparam int SLOT_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;
    warp_t            wb_warp, fw [N_FU];
    flags_t           wb_flags;
    logic [N_FU-1:0]  fault;
    logic [DEPTH-1:0] perr;
    logic             e0, e1, e2, e3;
    logic [SLOT_W:0]  cnt;
    refu_sp #(.DEPTH(DEPTH)) u_sp (
      .clk, .rst_n, .issue_valid(valid[d]), .issue(issue[d]), .issue_ready(ready[d]),
      .wb_valid(wb_valid[d]), .wb_warp, .wb_op(wb_op[d]), .wb_result(wb_result[d]), .wb_flags,
      .checked(checked[d]), .fault, .fault_warp(fw), .parity_err(perr),
      .ev_replay_start(e0), .ev_stall_fu_busy(e1), .ev_stall_rb_full(e2), .ev_wait_rb_space(e3),
      .rb_count(cnt), .idle(idle[d]), .inj_mask(zero_mask), .rb_inj_en(1'b0),
      .rb_inj_slot('0), .rb_inj_bit('0));
    always @(posedge clk) if (rst_n) check(fault == '0, "no fault in a fault-free run");
  end

  // per-configuration write-back scoreboard
  int wb_idx [N_CFG];
  always @(posedge clk) if (rst_n) begin
    for (int d = 0; d < N_CFG; d++) begin
      if (wb_valid[d]) begin
        while (wb_idx[d] < N_INS && prog[wb_idx[d]].op == OP_NOP) wb_idx[d]++;
        if (wb_idx[d] < N_INS) begin
          if (wb_result[d] != ref_exec(prog[wb_idx[d]].op, prog[wb_idx[d]].a, prog[wb_idx[d]].b).result ||
              wb_op[d] != prog[wb_idx[d]].op) n_bad[d]++;
        end else n_bad[d]++;
        wb_idx[d]++;
        n_wb[d]++;
      end
      n_chk[d] += $countones(checked[d]);
    end
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic drive(int d, output int cycles);
    int start;
    @(negedge clk);
    start = cyc;
    for (int i = 0; i < N_INS; i++) begin
      valid[d] = 1; issue[d] = prog[i];
      #1;
      while (!ready[d]) begin
        @(negedge clk);
        #1;
      end
      @(negedge clk);
    end
    valid[d] = 0;
    while (!idle[d]) @(negedge clk);
    cycles = cyc - start;
  endtask

  task automatic run_mix(string name, int alu_per_8);
    int normal, n_alu;
    int cycles [N_CFG];
    normal = 0; n_alu = 0;
    for (int i = 0; i < N_INS; i++) begin
      prog[i].warp_id = warp_t'($urandom_range(MAX_WARPS - 1));
      prog[i].op      = ($urandom_range(7) < alu_per_8) ? rand_alu_op() : op_e'($urandom_range(1));
      prog[i].a       = rand_operand();
      prog[i].b       = rand_operand();
      if (op_uses_alu(prog[i].op)) begin
        normal += ref_latency(op_fu(prog[i].op));
        n_alu++;
      end else normal += 1;
    end
    for (int d = 0; d < N_CFG; d++) begin
      wb_idx[d] = 0; n_bad[d] = 0; n_chk[d] = 0; n_wb[d] = 0;
    end
    fork
      drive(0, cycles[0]);
      drive(1, cycles[1]);
      drive(2, cycles[2]);
      drive(3, cycles[3]);
    join
    repeat (3) @(negedge clk);
    for (int d = 0; d < N_CFG; d++) begin
      check(n_bad[d] == 0, $sformatf("%s, buffer %0d: %0d wrong write-backs", name, d + 1, n_bad[d]));
      check(n_chk[d] == n_alu, $sformatf("%s, buffer %0d: %0d comparisons for %0d ALU instructions",
                                         name, d + 1, n_chk[d], n_alu));
      // the drive loop spends one extra cycle per instruction only on its
      // own handshake, which is what the normal count assumes as well
      check(cycles[d] >= normal, $sformatf("%s, buffer %0d faster than without re-execution", name, d + 1));
      if (d > 0) check(cycles[d] <= cycles[0],
                       $sformatf("%s, buffer %0d slower than buffer 1", name, d + 1));
      $display("%s: buffer %0d: %0d cycles, %0d without re-execution, relative throughput %0d.%02d%%",
               name, d + 1, cycles[d], normal, normal * 100 / cycles[d],
               (normal * 10000 / cycles[d]) % 100);
    end
  endtask

  initial begin
    valid = '0;
    for (int d = 0; d < N_CFG; d++) issue[d] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_mix("ALU-heavy mix", 7);
    run_mix("half-ALU mix", 4);
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
