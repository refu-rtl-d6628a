// tb_refu_stall_ctrl: self-checking testbench of refu_stall_ctrl.
//
// Directed cases for each rule (unit busy, full buffer giving the unit to the
// re-execution, free unit used by re-execution when the primary does not want
// it, MOV issuing without a unit, one primary in flight), then random unit and
// buffer states checked against a model of the rules written in the
// testbench.
module tb_refu_stall_ctrl;
  import refu_pkg::*;
  import refu_tb_ref::*;

  localparam int DEPTH  = 4;
  localparam int SLOT_W = 2;

  logic              issue_valid, prim_inflight, rb_full;
  op_e               issue_op;
  logic [N_FU-1:0]   fu_busy;
  logic [DEPTH-1:0]  rb_valid, rb_reexec;
  op_e               rb_op [DEPTH];
  logic              issue_ready, prim_start, red_start, stall_fu_busy, stall_rb_full;
  logic [SLOT_W-1:0] red_slot;

  refu_stall_ctrl #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  // expected outcome
  bit e_ready, e_prim, e_red;
  int e_slot;

  task automatic model();
    bit wants, alu, full;
    int pfu;
    alu   = (issue_op != OP_NOP && issue_op != OP_MOV);
    pfu   = int'(op_fu(issue_op));
    wants = issue_valid && !prim_inflight && alu;
    full  = (rb_valid == '1);
    e_red = 0; e_slot = 0;
    for (int s = 0; s < DEPTH; s++) begin
      int f;
      f = int'(op_fu(rb_op[s]));
      if (!e_red && rb_valid[s] && !rb_reexec[s] && !fu_busy[f]) begin
        if (full || !wants || f != pfu) begin
          e_red = 1; e_slot = s;
        end
      end
    end
    e_prim = wants && !fu_busy[pfu] && !(e_red && int'(op_fu(rb_op[e_slot])) == pfu);
    if (full) for (int s = 0; s < DEPTH; s++)
      if (rb_valid[s] && !rb_reexec[s] && int'(op_fu(rb_op[s])) == pfu) e_prim = 0;
    e_ready = issue_valid && !prim_inflight && (alu ? e_prim : 1);
  endtask

  task automatic apply_and_check(string name);
    #1;
    model();
    rb_full = (rb_valid == '1);
    #1;
    model();
    check(issue_ready == e_ready, {name, ": issue_ready"});
    check(prim_start == e_prim, {name, ": prim_start"});
    check(red_start == e_red, {name, ": red_start"});
    if (e_red) check(int'(red_slot) == e_slot, {name, ": red_slot"});
    check(!(stall_fu_busy && stall_rb_full), {name, ": one stall cause"});
    check((stall_fu_busy || stall_rb_full) == (issue_valid && !prim_inflight &&
          issue_op != OP_NOP && issue_op != OP_MOV && !e_prim), {name, ": stall cause reported"});
  endtask

  task automatic clear();
    issue_valid = 0; prim_inflight = 0; issue_op = OP_NOP; fu_busy = '0;
    rb_valid = '0; rb_reexec = '0; rb_full = 0;
    for (int s = 0; s < DEPTH; s++) rb_op[s] = OP_ADD;
  endtask

  initial begin
    // 1: ADD, unit free, buffer empty -> starts
    clear(); issue_valid = 1; issue_op = OP_ADD; apply_and_check("free");
    check(prim_start && issue_ready && !red_start, "free unit: primary starts");
    // 2: ADD, ADD/SUB unit busy -> stall
    clear(); issue_valid = 1; issue_op = OP_ADD; fu_busy[FU_ADDSUB] = 1; apply_and_check("busy");
    check(!issue_ready && stall_fu_busy, "busy unit: stall");
    // 3: buffer not full, waiting ADD entry, primary SUB wants the unit -> primary wins
    clear(); issue_valid = 1; issue_op = OP_SUB; rb_valid[0] = 1; apply_and_check("not full");
    check(prim_start && !red_start, "not full: primary keeps the unit");
    // 4: buffer full, waiting ADD entry, primary SUB -> re-execution wins, primary stalls
    clear(); issue_valid = 1; issue_op = OP_SUB; rb_valid = '1; rb_reexec = 4'b1110;
    apply_and_check("full");
    check(red_start && red_slot == 0 && !prim_start && stall_rb_full, "full: re-execution wins");
    // 5: waiting MUL entry, primary ADD -> both start on different units
    clear(); issue_valid = 1; issue_op = OP_ADD; rb_valid[2] = 1; rb_op[2] = OP_MUL;
    apply_and_check("parallel");
    check(red_start && red_slot == 2 && prim_start, "different units run together");
    // 6: MOV issues even with all units busy
    clear(); issue_valid = 1; issue_op = OP_MOV; fu_busy = '1; apply_and_check("mov");
    check(issue_ready && !prim_start, "MOV needs no unit");
    // 7: primary in flight blocks issue
    clear(); issue_valid = 1; issue_op = OP_AND; prim_inflight = 1; apply_and_check("inflight");
    check(!issue_ready, "one primary at a time");
    // random
    for (int i = 0; i < 20000; i++) begin
      issue_valid   = $urandom_range(3) != 0;
      prim_inflight = $urandom_range(3) == 0;
      issue_op      = op_e'($urandom_range(21));
      fu_busy       = N_FU'($urandom());
      rb_valid      = DEPTH'($urandom());
      if ($urandom_range(2) == 0) rb_valid = '1;
      rb_reexec     = DEPTH'($urandom()) & rb_valid & DEPTH'($urandom());
      for (int s = 0; s < DEPTH; s++) rb_op[s] = rand_alu_op();
      apply_and_check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
