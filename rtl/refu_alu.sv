// refu_alu: the ALU of one SP, split into six independent sub functional
// units (COMP, SHF, ADD/SUB, ML, LU, ICON), each an instance of refu_fu.
//
// The ALU has two start ports: one for the primary instruction stream and one
// for redundant re-executions from the replay buffer. Each start is steered to
// the unit that executes its instruction type, so a primary and a redundant
// operation run at the same time whenever they need different units; the
// caller must not start both on the same unit, nor start a busy unit. Every
// unit reports its own completion (done, result, flags and the tag given at
// start), so several operations can finish in one cycle; each unit waits for
// its own `accept`. Timing per unit is that of refu_fu: a unit started in cycle
// t delivers in cycle t+LATENCY-1 and is free again in the cycle after its
// result was accepted.
//
// Follows the document: the partition of the ALU into these units and the
// concurrent execution of primary and redundant instructions on different
// units. Own choices: one start of each kind per cycle, and the per-unit
// result ports in place of one shared result bus.
module refu_alu
  import refu_pkg::*;
#(
  parameter int unsigned TAG_W = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  // primary start
  input  logic             prim_start,
  input  op_e              prim_op,
  input  data_t            prim_a,
  input  data_t            prim_b,
  input  logic [TAG_W-1:0] prim_tag,
  // redundant (replay) start
  input  logic             red_start,
  input  op_e              red_op,
  input  data_t            red_a,
  input  data_t            red_b,
  input  logic [TAG_W-1:0] red_tag,
  // unit status and results
  output logic [N_FU-1:0]  fu_busy,
  output logic [N_FU-1:0]  fu_done,
  output data_t            fu_result [N_FU],
  output flags_t           fu_flags  [N_FU],
  output logic [TAG_W-1:0] fu_tag    [N_FU],
  input  logic [N_FU-1:0]  fu_accept,
  // test-only transient fault model, one mask per unit
  input  data_t            inj_mask  [N_FU]
);

  fu_e prim_fu, red_fu;
  assign prim_fu = op_fu(prim_op);
  assign red_fu  = op_fu(red_op);

  for (genvar f = 0; f < N_FU; f++) begin : g_fu
    logic  sel_prim, sel_red;
    assign sel_prim = prim_start && (prim_fu == fu_e'(f));
    assign sel_red  = red_start  && (red_fu  == fu_e'(f));

    refu_fu #(
      .FU    (fu_e'(f)),
      .TAG_W (TAG_W)
    ) u_fu (
      .clk         (clk),
      .rst_n       (rst_n),
      .start       (sel_prim || sel_red),
      .start_op    (sel_red ? red_op  : prim_op),
      .start_a     (sel_red ? red_a   : prim_a),
      .start_b     (sel_red ? red_b   : prim_b),
      .start_tag   (sel_red ? red_tag : prim_tag),
      .busy        (fu_busy[f]),
      .done        (fu_done[f]),
      .done_result (fu_result[f]),
      .done_flags  (fu_flags[f]),
      .done_tag    (fu_tag[f]),
      .accept      (fu_accept[f]),
      .inj_mask    (inj_mask[f])
    );

    a_one_start: assert property (@(posedge clk) disable iff (!rst_n) !(sel_prim && sel_red))
      else $error("refu_alu: primary and redundant start on the same unit");
  end

endmodule
