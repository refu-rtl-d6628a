// tb_refu_alu: self-checking testbench of refu_alu.
//
// Starts a primary and a redundant operation in the same cycle on two
// different, randomly chosen units, then checks that each finishes on its own
// unit after that unit's occupancy, with the right result, flags and tag, and
// that the other units stay idle. Also checks that a unit withheld its accept
// keeps the result, and that a unit's fault mask affects only that unit.
module tb_refu_alu;
  import refu_pkg::*;
  import refu_tb_ref::*;

  localparam int TAG_W = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             prim_start, red_start;
  op_e              prim_op, red_op;
  data_t            prim_a, prim_b, red_a, red_b;
  logic [TAG_W-1:0] prim_tag, red_tag;
  logic [N_FU-1:0]  fu_busy, fu_done, fu_accept;
  data_t            fu_result [N_FU];
  flags_t           fu_flags  [N_FU];
  logic [TAG_W-1:0] fu_tag    [N_FU];
  data_t            inj_mask  [N_FU];

  refu_alu #(.TAG_W(TAG_W)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    prim_start = 0; red_start = 0; prim_op = OP_NOP; red_op = OP_NOP;
    prim_a = 0; prim_b = 0; red_a = 0; red_b = 0; prim_tag = 0; red_tag = 0;
    fu_accept = '1;
    for (int f = 0; f < N_FU; f++) inj_mask[f] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      int       fp, fr, lat_p, lat_r, hold_p, inj_r;
      op_e      op_p, op_r;
      data_t    ap, bp, ar, br;
      ref_out_t ep, er;
      bit       seen_p, seen_r;
      fp = $urandom_range(N_FU - 1);
      do fr = $urandom_range(N_FU - 1); while (fr == fp);
      op_p = rand_op_of(fu_e'(fp)); op_r = rand_op_of(fu_e'(fr));
      ap = rand_operand(); bp = rand_operand(); ar = rand_operand(); br = rand_operand();
      ep = ref_exec(op_p, ap, bp); er = ref_exec(op_r, ar, br);
      lat_p = ref_latency(fu_e'(fp)); lat_r = ref_latency(fu_e'(fr));
      hold_p = (i % 5 == 0) ? 2 : 0;
      inj_r  = (i % 11 == 0);
      @(negedge clk);
      check(fu_busy == '0, "all units idle before start");
      prim_start = 1; prim_op = op_p; prim_a = ap; prim_b = bp; prim_tag = TAG_W'(i);
      red_start  = 1; red_op  = op_r; red_a  = ar; red_b  = br; red_tag  = TAG_W'(i + 3);
      if (inj_r) inj_mask[fr] = 32'h0000_0100;
      fu_accept = '1;
      if (hold_p) fu_accept[fp] = 0;
      @(negedge clk);
      prim_start = 0; red_start = 0;
      seen_p = 0; seen_r = 0;
      for (int c = 1; c <= 6; c++) begin
        for (int f = 0; f < N_FU; f++)
          if (f != fp && f != fr) check(!fu_busy[f] && !fu_done[f], "uninvolved unit idle");
        if (fu_done[fp] && !seen_p) begin
          seen_p = 1;
          check(c == lat_p - 1, $sformatf("primary on unit %0d done after %0d", fp, c));
          check(fu_result[fp] == ep.result && fu_flags[fp] == ep.flags,
                $sformatf("primary %s result %h want %h", op_p.name(), fu_result[fp], ep.result));
          check(fu_tag[fp] == TAG_W'(i), "primary tag");
        end
        if (fu_done[fr] && !seen_r) begin
          seen_r = 1;
          check(c == lat_r - 1, $sformatf("redundant on unit %0d done after %0d", fr, c));
          if (inj_r) check(fu_result[fr] != er.result, "fault mask corrupts redundant result");
          else       check(fu_result[fr] == er.result && fu_flags[fr] == er.flags,
                           $sformatf("redundant %s result %h want %h", op_r.name(), fu_result[fr], er.result));
          check(fu_tag[fr] == TAG_W'(i + 3), "redundant tag");
        end
        if (hold_p && c == lat_p + 1) begin
          check(fu_done[fp] && fu_result[fp] == ep.result, "held primary result");
          fu_accept[fp] = 1;
        end
        @(negedge clk);
      end
      check(seen_p && seen_r, "both operations finished");
      inj_mask[fr] = '0;
      check(fu_busy == '0, "all units idle after completion");
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
