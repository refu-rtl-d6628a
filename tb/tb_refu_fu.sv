// tb_refu_fu: self-checking testbench of refu_fu, all six unit kinds.
//
// For random operations of each kind it checks the result and flags against
// the reference model, the occupancy (done exactly LATENCY-1 cycles after the
// start edge, i.e. LATENCY cycles including the start cycle: 2 for ADD/SUB,
// COMP, SHF, LU, ICON and 3 for ML), that busy covers the whole occupancy,
// that a result is held unchanged while not accepted, that the tag comes back,
// and that inj_mask corrupts the result.
module tb_refu_fu;
  import refu_pkg::*;
  import refu_tb_ref::*;

  localparam int TAG_W = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             start  [N_FU];
  op_e              op     [N_FU];
  data_t            a      [N_FU], b [N_FU];
  logic [TAG_W-1:0] tag    [N_FU];
  logic             busy   [N_FU], done [N_FU], accept [N_FU];
  data_t            res    [N_FU], inj [N_FU];
  flags_t           flg    [N_FU];
  logic [TAG_W-1:0] dtag   [N_FU];

  for (genvar f = 0; f < N_FU; f++) begin : g_dut
    refu_fu #(.FU(fu_e'(f)), .TAG_W(TAG_W)) dut (
      .clk(clk), .rst_n(rst_n),
      .start(start[f]), .start_op(op[f]), .start_a(a[f]), .start_b(b[f]), .start_tag(tag[f]),
      .busy(busy[f]), .done(done[f]), .done_result(res[f]), .done_flags(flg[f]),
      .done_tag(dtag[f]), .accept(accept[f]), .inj_mask(inj[f]));
  end

  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  // one operation on unit f; hold = cycles to withhold accept after done
  task automatic run_op(int f, op_e o, data_t x, data_t y, int hold, data_t mask);
    ref_out_t exp;
    int       waited;
    logic [TAG_W-1:0] t;
    exp = ref_exec(o, x, y);
    t   = TAG_W'($urandom());
    @(negedge clk);
    check(!busy[f], "unit busy before start");
    start[f] = 1; op[f] = o; a[f] = x; b[f] = y; tag[f] = t; inj[f] = mask;
    accept[f] = (hold == 0);
    @(posedge clk);
    @(negedge clk);
    start[f] = 0; op[f] = OP_NOP; a[f] = '0; b[f] = '0;
    waited = 1;
    while (!done[f] && waited < 10) begin
      check(busy[f], "busy during execution");
      @(negedge clk);
      waited++;
    end
    check(waited == ref_latency(fu_e'(f)) - 1,
          $sformatf("unit %0d op %s: done after %0d cycles, want %0d", f, o.name(), waited,
                    ref_latency(fu_e'(f)) - 1));
    for (int h = 0; h < hold; h++) begin
      check(done[f] && busy[f], "result held while not accepted");
      check(res[f] == (exp.result ^ mask), "held result stable");
      @(negedge clk);
    end
    accept[f] = 1;
    check(dtag[f] == t, "tag returned");
    if (mask == 0) begin
      check(res[f] == exp.result,
            $sformatf("unit %0d %s %h %h: result %h want %h", f, o.name(), x, y, res[f], exp.result));
      check(flg[f] == exp.flags,
            $sformatf("unit %0d %s %h %h: flags %b want %b", f, o.name(), x, y, flg[f], exp.flags));
    end else begin
      check(res[f] != exp.result, "injected fault changes the result");
    end
    @(negedge clk);
    check(!busy[f] && !done[f], "unit free after accept");
    inj[f] = '0;
  endtask

  initial begin
    for (int f = 0; f < N_FU; f++) begin
      start[f] = 0; op[f] = OP_NOP; a[f] = 0; b[f] = 0; tag[f] = 0; accept[f] = 1; inj[f] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      int f;
      f = i % N_FU;
      run_op(f, rand_op_of(fu_e'(f)), rand_operand(), rand_operand(), (i % 7 == 0) ? 2 : 0, '0);
    end
    // every operation at least once with plain random operands
    for (int o = 2; o <= 21; o++)
      run_op(int'(op_fu(op_e'(o))), op_e'(o), $urandom(), $urandom(), 0, '0);
    // transient fault model
    for (int f = 0; f < N_FU; f++)
      run_op(f, rand_op_of(fu_e'(f)), $urandom(), $urandom(), 0, 32'h1 << (f * 5));
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
