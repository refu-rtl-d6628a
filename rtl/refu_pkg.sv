// refu_pkg: types and constants shared by the REFU execution stage.
//
// REFU detects transient faults in the ALU of a GPGPU streaming processor (SP)
// by re-executing every ALU instruction a second time on whichever sub
// functional unit of the ALU is idle, and comparing the two results. This
// package holds the instruction-type encoding, the six sub functional units
// of the ALU (COMP, SHF, ADD/SUB, ML, LU, ICON), the flag bundle and the
// replay buffer entry (warp ID, instruction type, source operands, result,
// flags, valid bit, re-execute bit, plus a parity bit over warp ID, valid and
// re-execute).
//
// Follows the document: the list of functional units, the fields of a replay
// buffer entry, parity on the warp ID / valid / re-execute fields, the 2-cycle
// ADD/SUB/CMP and 3-cycle MUL occupancy of the cycle-by-cycle example, and the
// 48 warps per SM of the evaluated GPU. Own choices: 32-bit data, two source
// operands, the four flags, the opcode list and its encoding, and 2 cycles for
// the units whose latency the document does not show (SHF, LU, ICON).
package refu_pkg;

  parameter int unsigned DATA_W    = 32;
  parameter int unsigned MAX_WARPS = 48;            // maximum warps per SM
  parameter int unsigned WARP_W    = $clog2(MAX_WARPS);
  parameter int unsigned N_FU      = 6;             // sub functional units of the ALU

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [WARP_W-1:0] warp_t;

  // Instruction type. MOV and NOP use no ALU unit and are never re-executed.
  typedef enum logic [4:0] {
    OP_NOP    = 5'd0,
    OP_MOV    = 5'd1,
    OP_ADD    = 5'd2,
    OP_SUB    = 5'd3,
    OP_MUL    = 5'd4,   // low 32 bits of the signed/unsigned product
    OP_MULHU  = 5'd5,   // high 32 bits of the unsigned product
    OP_CMPEQ  = 5'd6,
    OP_CMPLT  = 5'd7,   // signed a < b
    OP_CMPLTU = 5'd8,   // unsigned a < b
    OP_MIN    = 5'd9,   // signed minimum
    OP_MAX    = 5'd10,  // signed maximum
    OP_SHL    = 5'd11,
    OP_SHR    = 5'd12,
    OP_SRA    = 5'd13,
    OP_AND    = 5'd14,
    OP_OR     = 5'd15,
    OP_XOR    = 5'd16,
    OP_NOT    = 5'd17,
    OP_SEXT8  = 5'd18,  // data conversion: sign-extend byte
    OP_SEXT16 = 5'd19,  // data conversion: sign-extend halfword
    OP_ZEXT8  = 5'd20,  // data conversion: zero-extend byte
    OP_ZEXT16 = 5'd21   // data conversion: zero-extend halfword
  } op_e;

  // Sub functional units, in the order of the ALU drawing.
  typedef enum logic [2:0] {
    FU_COMP   = 3'd0,
    FU_SHF    = 3'd1,
    FU_ADDSUB = 3'd2,
    FU_ML     = 3'd3,
    FU_LU     = 3'd4,
    FU_ICON   = 3'd5
  } fu_e;

  typedef struct packed {
    logic z;   // result is zero
    logic n;   // result is negative
    logic c;   // carry / unsigned borrow
    logic v;   // signed overflow
  } flags_t;

  // Execution cycles (occupancy) of each unit.
  function automatic int unsigned fu_latency(fu_e fu);
    case (fu)
      FU_ML:   return 3;
      default: return 2;
    endcase
  endfunction

  // Does this instruction use an ALU unit (and so need re-execution)?
  function automatic logic op_uses_alu(op_e op);
    return !(op == OP_NOP || op == OP_MOV);
  endfunction

  // Unit that executes an ALU instruction.
  function automatic fu_e op_fu(op_e op);
    case (op)
      OP_ADD, OP_SUB:                                 return FU_ADDSUB;
      OP_MUL, OP_MULHU:                               return FU_ML;
      OP_CMPEQ, OP_CMPLT, OP_CMPLTU, OP_MIN, OP_MAX:  return FU_COMP;
      OP_SHL, OP_SHR, OP_SRA:                         return FU_SHF;
      OP_AND, OP_OR, OP_XOR, OP_NOT:                  return FU_LU;
      default:                                        return FU_ICON;
    endcase
  endfunction

  // What the pipeline hands to an SP for one thread of a warp instruction:
  // dependency-resolved operand values read from the register file.
  typedef struct packed {
    warp_t warp_id;
    op_e   op;
    data_t a;
    data_t b;
  } issue_t;

  // One replay buffer entry.
  typedef struct packed {
    warp_t  warp_id;
    op_e    op;       // instruction type
    data_t  a;        // source operands
    data_t  b;
    data_t  result;
    flags_t flags;
    logic   valid;    // entry holds an instruction waiting for re-execution
    logic   reexec;   // re-execution of this entry is in progress
    logic   parity;   // even parity over warp_id, valid, reexec
  } rb_entry_t;

  parameter int unsigned RB_ENTRY_W = $bits(rb_entry_t);

  function automatic logic rb_parity(warp_t w, logic valid, logic reexec);
    return ^{w, valid, reexec};
  endfunction

endpackage
