// tb_refu_compare: self-checking testbench of refu_compare.
//
// Applies matching and mismatching (one flipped result or flag bit) pairs of
// stored and re-executed results and checks that `fault` pulses exactly in the
// cycle after a mismatching check, with the warp ID, that `checked` pulses for
// every check, and that nothing is reported without `check`.
module tb_refu_compare;
  import refu_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   check_i, checked, fault;
  warp_t  warp_id, fault_warp;
  data_t  stored_result, redo_result;
  flags_t stored_flags, redo_flags;

  refu_compare dut (.clk, .rst_n, .check(check_i), .warp_id, .stored_result, .stored_flags,
                    .redo_result, .redo_flags, .checked, .fault, .fault_warp);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    check_i = 0; warp_id = 0; stored_result = 0; redo_result = 0; stored_flags = 0; redo_flags = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      int    kind, bitpos;
      warp_t w;
      kind = $urandom_range(3);     // 0: match, 1: result bit, 2: flag bit, 3: no check
      w = warp_t'($urandom_range(MAX_WARPS - 1));
      @(negedge clk);
      check_i       = (kind != 3);
      warp_id       = w;
      stored_result = $urandom();
      stored_flags  = flags_t'($urandom());
      redo_result   = stored_result;
      redo_flags    = stored_flags;
      bitpos = $urandom_range(31);
      if (kind == 1) redo_result[bitpos] = ~redo_result[bitpos];
      if (kind == 2) redo_flags[bitpos % 4] = ~redo_flags[bitpos % 4];
      if (kind == 3) redo_result = ~stored_result;
      @(negedge clk);
      check_i = 0;
      check(checked == (kind != 3), "checked pulse");
      check(fault == (kind == 1 || kind == 2), $sformatf("fault for kind %0d", kind));
      if (kind == 1 || kind == 2) check(fault_warp == w, "fault warp ID");
      @(negedge clk);
      check(!fault && !checked, "one-cycle pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
