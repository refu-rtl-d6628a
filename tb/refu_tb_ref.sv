// refu_tb_ref: reference model of the ALU operations for the testbenches.
//
// Written independently of the RTL: results and flags are worked out with
// 64-bit integer arithmetic instead of carry bits and bit slicing.
package refu_tb_ref;
  import refu_pkg::*;

  typedef struct packed {
    data_t  result;
    flags_t flags;
  } ref_out_t;

  function automatic ref_out_t ref_exec(op_e op, data_t a, data_t b);
    longint          sa, sb, sr;
    longint unsigned ua, ub, ur;
    ref_out_t        o;
    sa = longint'($signed(a));
    sb = longint'($signed(b));
    ua = {32'd0, a};
    ub = {32'd0, b};
    o  = '0;
    case (op)
      OP_ADD: begin
        ur = ua + ub; sr = sa + sb;
        o.result  = ur[31:0];
        o.flags.c = ur > 64'hFFFF_FFFF;
        o.flags.v = (sr > 64'sd2147483647) || (sr < -64'sd2147483648);
      end
      OP_SUB, OP_CMPEQ, OP_CMPLT, OP_CMPLTU, OP_MIN, OP_MAX: begin
        sr = sa - sb;
        o.flags.c = ua < ub;
        o.flags.v = (sr > 64'sd2147483647) || (sr < -64'sd2147483648);
        case (op)
          OP_SUB:    o.result = a - b;
          OP_CMPEQ:  o.result = (a == b) ? 1 : 0;
          OP_CMPLT:  o.result = (sa < sb) ? 1 : 0;
          OP_CMPLTU: o.result = (ua < ub) ? 1 : 0;
          OP_MIN:    o.result = (sa < sb) ? a : b;
          default:   o.result = (sa < sb) ? b : a;
        endcase
      end
      OP_MUL, OP_MULHU: begin
        ur = ua * ub;
        o.result  = (op == OP_MUL) ? ur[31:0] : ur[63:32];
        o.flags.c = ur > 64'hFFFF_FFFF;
      end
      OP_SHL:    o.result = data_t'(ua << (ub % 32));
      OP_SHR:    o.result = data_t'(ua >> (ub % 32));
      OP_SRA:    o.result = data_t'(sa >>> (ub % 32));
      OP_AND:    o.result = a & b;
      OP_OR:     o.result = a | b;
      OP_XOR:    o.result = a ^ b;
      OP_NOT:    o.result = ~a;
      OP_SEXT8:  o.result = data_t'(longint'($signed(a[7:0])));
      OP_SEXT16: o.result = data_t'(longint'($signed(a[15:0])));
      OP_ZEXT8:  o.result = a % 256;
      OP_ZEXT16: o.result = a % 65536;
      default:   o.result = a;
    endcase
    o.flags.z = (o.result == 0);
    o.flags.n = o.result[31];
    return o;
  endfunction

  // a random operation executed by unit f
  function automatic op_e rand_op_of(fu_e f);
    op_e ops[$];
    for (int i = 2; i <= 21; i++) if (op_fu(op_e'(i)) == f) ops.push_back(op_e'(i));
    return ops[$urandom_range(ops.size() - 1)];
  endfunction

  // a random ALU operation
  function automatic op_e rand_alu_op();
    return op_e'($urandom_range(21, 2));
  endfunction

  // operands with more interesting corner values than plain random
  function automatic data_t rand_operand();
    case ($urandom_range(5))
      0:       return 32'h0;
      1:       return 32'hFFFF_FFFF;
      2:       return 32'h8000_0000;
      3:       return 32'h7FFF_FFFF;
      default: return $urandom();
    endcase
  endfunction

  // occupancy of unit f in cycles, as in the document's cycle-by-cycle example
  function automatic int ref_latency(fu_e f);
    return (f == FU_ML) ? 3 : 2;
  endfunction
endpackage
