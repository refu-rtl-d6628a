// tb_refu_replay_buffer: self-checking testbench of refu_replay_buffer at its
// default size (4 entries).
//
// Runs random writes, re-execution starts and retirements against a model of
// the buffer kept in the testbench, checking every stored field, the valid and
// re-execute bits, count, full and wr_ready (including a write into a full
// buffer in the cycle one entry retires), and that flipping the warp ID,
// valid or re-execute bit of a location raises that location's parity error
// while flipping a data bit does not.
module tb_refu_replay_buffer;
  import refu_pkg::*;

  localparam int DEPTH  = 4;
  localparam int SLOT_W = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              wr_en, wr_ready, start_en, full, inj_en;
  warp_t             wr_warp;
  op_e               wr_op;
  data_t             wr_a, wr_b, wr_result;
  flags_t            wr_flags;
  logic [SLOT_W-1:0] start_slot, inj_slot;
  logic [DEPTH-1:0]  retire, parity_err;
  rb_entry_t         entries [DEPTH];
  logic [SLOT_W:0]   count;
  logic [$clog2(RB_ENTRY_W)-1:0] inj_bit;

  refu_replay_buffer #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  // model
  rb_entry_t m [DEPTH];
  int        full_writes = 0;

  function automatic int model_count();
    int n = 0;
    for (int s = 0; s < DEPTH; s++) n += m[s].valid;
    return n;
  endfunction

  task automatic compare_all();
    check(count == model_count(), $sformatf("count %0d want %0d", count, model_count()));
    check(full == (model_count() == DEPTH), "full flag");
    for (int s = 0; s < DEPTH; s++) begin
      check(entries[s].valid == m[s].valid && entries[s].reexec == m[s].reexec,
            $sformatf("slot %0d valid/reexec", s));
      if (m[s].valid)
        check(entries[s].warp_id == m[s].warp_id && entries[s].op == m[s].op &&
              entries[s].a == m[s].a && entries[s].b == m[s].b &&
              entries[s].result == m[s].result && entries[s].flags == m[s].flags,
              $sformatf("slot %0d contents", s));
      check(!parity_err[s], "no parity error without upset");
    end
  endtask

  initial begin
    wr_en = 0; start_en = 0; retire = 0; inj_en = 0; inj_slot = 0; inj_bit = 0; start_slot = 0;
    wr_warp = 0; wr_op = OP_NOP; wr_a = 0; wr_b = 0; wr_result = 0; wr_flags = 0;
    for (int s = 0; s < DEPTH; s++) m[s] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int free_slot, ret_any;
      @(negedge clk);
      compare_all();
      // random retire of running entries, random start of waiting ones
      retire = '0;
      for (int s = 0; s < DEPTH; s++)
        if (m[s].valid && m[s].reexec && ($urandom_range(2) == 0)) retire[s] = 1;
      start_en = 0;
      for (int s = 0; s < DEPTH; s++)
        if (!start_en && m[s].valid && !m[s].reexec && ($urandom_range(1) == 0)) begin
          start_en = 1; start_slot = SLOT_W'(s);
        end
      free_slot = -1;
      for (int s = DEPTH - 1; s >= 0; s--) if (!m[s].valid || retire[s]) free_slot = s;
      #1;
      check(wr_ready == (free_slot >= 0), "wr_ready");
      wr_en = (free_slot >= 0) && ($urandom_range(3) != 0);
      wr_warp = warp_t'($urandom_range(MAX_WARPS - 1)); wr_op = op_e'($urandom_range(21, 2));
      wr_a = $urandom(); wr_b = $urandom(); wr_result = $urandom(); wr_flags = flags_t'($urandom());
      if (wr_en && model_count() == DEPTH) full_writes++;
      @(posedge clk);
      #1;
      for (int s = 0; s < DEPTH; s++) if (retire[s]) begin m[s].valid = 0; m[s].reexec = 0; end
      if (start_en) m[start_slot].reexec = 1;
      if (wr_en) begin
        m[free_slot].warp_id = wr_warp; m[free_slot].op = wr_op; m[free_slot].a = wr_a;
        m[free_slot].b = wr_b; m[free_slot].result = wr_result; m[free_slot].flags = wr_flags;
        m[free_slot].valid = 1; m[free_slot].reexec = 0;
      end
      wr_en = 0; start_en = 0; retire = '0;
    end
    check(full_writes > 0, "write into a full buffer while an entry retires happened");
    // bit upsets: fields covered by parity and one that is not
    for (int k = 0; k < 4; k++) begin
      int pos, s;
      bit covered;
      s = k;
      case (k)
        0: begin pos = RB_ENTRY_W - 1 - ($urandom_range(WARP_W - 1)); covered = 1; end // warp ID
        1: begin pos = 2; covered = 1; end                                             // valid
        2: begin pos = 1; covered = 1; end                                             // reexec
        default: begin pos = 3 + 4 + $urandom_range(31); covered = 0; end              // result
      endcase
      @(negedge clk);
      inj_en = 1; inj_slot = SLOT_W'(s); inj_bit = ($clog2(RB_ENTRY_W))'(pos);
      @(negedge clk);
      inj_en = 0;
      check(parity_err[s] == covered, $sformatf("parity error after upset of bit %0d", pos));
      for (int o = s + 1; o < DEPTH; o++) check(!parity_err[o], "other slots clean");
      // keep the upset visible across a start/retire
      if (covered) begin
        retire = '0; retire[s] = 1;
        @(negedge clk);
        retire = '0;
        check(parity_err[s], "parity error survives retire");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
