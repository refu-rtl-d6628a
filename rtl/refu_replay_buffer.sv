// refu_replay_buffer: the replay buffer of one SP.
//
// Every ALU instruction that finishes its primary execution is written here
// with its warp ID, instruction type, dependency-resolved source operands,
// result and flags, and marked valid. While its re-execution runs, the entry's
// re-execute bit is set, so the location cannot be given to a new
// instruction; when the re-execution has been compared, the entry is retired
// (valid and re-execute cleared) and the location is free again. Entries of
// different warps can be held at the same time.
//
// The operands, result, flags and instruction type need no protection of
// their own: an upset in them shows up as a mismatch at re-execution. The
// warp ID, valid and re-execute bits are covered by an even parity bit, which
// is checked on every location in every cycle (`parity_err`, a level that
// stays up until the location is written with a new entry).
//
// Interface and timing: `wr_en` writes the lowest free location at the clock
// edge; a location being retired in the same cycle counts as free, so a full
// buffer accepts a write in the cycle one of its entries retires (`wr_ready`).
// `start_en`/`start_slot` set the re-execute bit; `retire` clears entries.
// All entries are visible on `entries`. `inj_en`/`inj_slot`/`inj_bit` flip one
// stored bit and exist only to test the protection; tie `inj_en` low in use.
//
// Follows the document: the fields of an entry, the meaning of the valid and
// re-execute bits, parity on warp ID / valid / re-execute, and the buffer
// sizes 1 to 4 that it evaluates (4 is the default here). Own choices: lowest
// free location first, and reset to empty.
module refu_replay_buffer
  import refu_pkg::*;
#(
  parameter int unsigned DEPTH  = 4,
  parameter int unsigned SLOT_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // write of a primary execution
  input  logic                  wr_en,
  input  warp_t                 wr_warp,
  input  op_e                   wr_op,
  input  data_t                 wr_a,
  input  data_t                 wr_b,
  input  data_t                 wr_result,
  input  flags_t                wr_flags,
  output logic                  wr_ready,
  // re-execution control
  input  logic                  start_en,
  input  logic [SLOT_W-1:0]     start_slot,
  input  logic [DEPTH-1:0]      retire,
  // state
  output rb_entry_t             entries    [DEPTH],
  output logic                  full,
  output logic [SLOT_W:0]       count,
  output logic [DEPTH-1:0]      parity_err,
  // test-only single bit upset
  input  logic                  inj_en,
  input  logic [SLOT_W-1:0]     inj_slot,
  input  logic [$clog2(RB_ENTRY_W)-1:0] inj_bit
);

  rb_entry_t mem [DEPTH];

  // lowest location that is free now or freed this cycle
  logic [DEPTH-1:0]  free_vec;
  logic [SLOT_W-1:0] wr_slot;
  always_comb begin
    wr_slot = '0;
    for (int s = DEPTH - 1; s >= 0; s--) begin
      free_vec[s] = !mem[s].valid || retire[s];
      if (free_vec[s]) wr_slot = SLOT_W'(s);
    end
  end
  assign wr_ready = |free_vec;

  always_comb begin
    count = '0;
    for (int s = 0; s < DEPTH; s++) begin
      count         = count + (SLOT_W+1)'(mem[s].valid);
      parity_err[s] = rb_parity(mem[s].warp_id, mem[s].valid, mem[s].reexec) != mem[s].parity;
      entries[s]    = mem[s];
    end
  end
  assign full = (count == (SLOT_W+1)'(DEPTH));

  rb_entry_t mem_nxt [DEPTH];
  always_comb begin
    for (int s = 0; s < DEPTH; s++) begin
      mem_nxt[s] = mem[s];
      if (retire[s]) begin
        mem_nxt[s].valid  = 1'b0;
        mem_nxt[s].reexec = 1'b0;
      end
      if (start_en && start_slot == SLOT_W'(s)) mem_nxt[s].reexec = 1'b1;
      if (wr_en && wr_ready && wr_slot == SLOT_W'(s)) begin
        mem_nxt[s].warp_id = wr_warp;
        mem_nxt[s].op      = wr_op;
        mem_nxt[s].a       = wr_a;
        mem_nxt[s].b       = wr_b;
        mem_nxt[s].result  = wr_result;
        mem_nxt[s].flags   = wr_flags;
        mem_nxt[s].valid   = 1'b1;
        mem_nxt[s].reexec  = 1'b0;
        mem_nxt[s].parity  = rb_parity(wr_warp, 1'b1, 1'b0);
      end else begin
        // start and retire update the parity incrementally, so that an upset
        // already present stays visible; a new entry gets fresh parity
        mem_nxt[s].parity = mem[s].parity
                          ^ rb_parity(mem[s].warp_id, mem[s].valid, mem[s].reexec)
                          ^ rb_parity(mem_nxt[s].warp_id, mem_nxt[s].valid, mem_nxt[s].reexec);
      end
      if (inj_en && inj_slot == SLOT_W'(s))
        mem_nxt[s] = mem_nxt[s] ^ (rb_entry_t'(1) << inj_bit);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < DEPTH; s++) mem[s] <= '0;
    end else begin
      for (int s = 0; s < DEPTH; s++) mem[s] <= mem_nxt[s];
    end
  end

  a_wr_space: assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> wr_ready)
    else $error("refu_replay_buffer: write while full");
  a_start_valid: assert property (@(posedge clk) disable iff (!rst_n)
                                  start_en |-> mem[start_slot].valid && !mem[start_slot].reexec)
    else $error("refu_replay_buffer: re-execution of an empty or running entry");

endmodule
