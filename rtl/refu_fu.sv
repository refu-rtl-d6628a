// refu_fu: one sub functional unit of the SP ALU (COMP, SHF, ADD/SUB, ML, LU
// or ICON, chosen by the parameter FU).
//
// The unit is not pipelined: it takes one operation at a time and is occupied
// for LATENCY cycles, which is what lets a redundant re-execution use a unit
// that the primary instruction stream leaves idle. A start in cycle t latches
// the operation, the operands and a caller-defined tag; the unit is busy from
// cycle t+1 on and presents `done` with result, flags and tag in cycle
// t+LATENCY-1, so that the unit is occupied for exactly LATENCY cycles
// (t .. t+LATENCY-1). If `accept` is low while `done` is high, the unit holds
// its result and stays busy until it is taken. It can start again in the
// cycle after the result was taken.
//
// `inj_mask` is XORed into the result while `done` is high. It models a
// transient fault inside the unit for testing and is tied to zero in use.
//
// Follows the document: the six units and that each executes its own class of
// instruction independently of the others; the 2-cycle ADD/SUB and COMP and
// 3-cycle ML occupancy are taken from its cycle-by-cycle example. Own choices:
// the operations of each unit, the flag definitions, the latency of SHF, LU
// and ICON, and the hold-until-accepted handshake.
module refu_fu
  import refu_pkg::*;
#(
  parameter fu_e         FU      = FU_ADDSUB,
  parameter int unsigned LATENCY = fu_latency(FU),
  parameter int unsigned TAG_W   = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  // start of an operation; only while !busy
  input  logic             start,
  input  op_e              start_op,
  input  data_t            start_a,
  input  data_t            start_b,
  input  logic [TAG_W-1:0] start_tag,
  output logic             busy,
  // result
  output logic             done,
  output data_t            done_result,
  output flags_t           done_flags,
  output logic [TAG_W-1:0] done_tag,
  input  logic             accept,
  // test-only transient fault model
  input  data_t            inj_mask
);

  logic                          active;
  logic [$clog2(LATENCY+1)-1:0]  cnt;
  op_e                           op_q;
  data_t                         a_q, b_q;
  logic [TAG_W-1:0]              tag_q;

  assign busy = active;
  assign done = active && (cnt == 1);
  assign done_tag = tag_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      cnt    <= '0;
      op_q   <= OP_NOP;
      a_q    <= '0;
      b_q    <= '0;
      tag_q  <= '0;
    end else if (!active) begin
      if (start) begin
        active <= 1'b1;
        cnt    <= ($clog2(LATENCY+1))'(LATENCY - 1);
        op_q   <= start_op;
        a_q    <= start_a;
        b_q    <= start_b;
        tag_q  <= start_tag;
      end
    end else if (cnt > 1) begin
      cnt <= cnt - 1'b1;
    end else if (accept) begin
      active <= 1'b0;
    end
  end

  // ---------------------------------------------------------------------
  // Operation of the unit
  // ---------------------------------------------------------------------
  data_t          res;
  logic           c_f, v_f;
  logic [DATA_W:0] sum;
  logic [2*DATA_W-1:0] prod;
  logic           lt_s;

  always_comb begin
    res  = '0;
    c_f  = 1'b0;
    v_f  = 1'b0;
    sum  = '0;
    prod = '0;
    lt_s = 1'b0;
    unique case (FU)
      FU_ADDSUB: begin
        if (op_q == OP_SUB) begin
          sum = {1'b0, a_q} + {1'b0, ~b_q} + 1'b1;
          res = sum[DATA_W-1:0];
          c_f = ~sum[DATA_W];                        // borrow
          v_f = (a_q[DATA_W-1] != b_q[DATA_W-1]) && (res[DATA_W-1] != a_q[DATA_W-1]);
        end else begin
          sum = {1'b0, a_q} + {1'b0, b_q};
          res = sum[DATA_W-1:0];
          c_f = sum[DATA_W];
          v_f = (a_q[DATA_W-1] == b_q[DATA_W-1]) && (res[DATA_W-1] != a_q[DATA_W-1]);
        end
      end
      FU_ML: begin
        prod = {{DATA_W{1'b0}}, a_q} * {{DATA_W{1'b0}}, b_q};
        res  = (op_q == OP_MULHU) ? prod[2*DATA_W-1:DATA_W] : prod[DATA_W-1:0];
        c_f  = |prod[2*DATA_W-1:DATA_W];             // product does not fit 32 bits
      end
      FU_COMP: begin
        sum  = {1'b0, a_q} + {1'b0, ~b_q} + 1'b1;    // a - b
        lt_s = $signed(a_q) < $signed(b_q);
        c_f  = ~sum[DATA_W];
        v_f  = (a_q[DATA_W-1] != b_q[DATA_W-1]) && (sum[DATA_W-1] != a_q[DATA_W-1]);
        case (op_q)
          OP_CMPEQ:  res = data_t'(a_q == b_q);
          OP_CMPLT:  res = data_t'(lt_s);
          OP_CMPLTU: res = data_t'(a_q < b_q);
          OP_MIN:    res = lt_s ? a_q : b_q;
          default:   res = lt_s ? b_q : a_q;         // OP_MAX
        endcase
      end
      FU_SHF: begin
        case (op_q)
          OP_SHL:  res = a_q << b_q[4:0];
          OP_SHR:  res = a_q >> b_q[4:0];
          default: res = data_t'($signed(a_q) >>> b_q[4:0]);   // OP_SRA
        endcase
      end
      FU_LU: begin
        case (op_q)
          OP_AND:  res = a_q & b_q;
          OP_OR:   res = a_q | b_q;
          OP_XOR:  res = a_q ^ b_q;
          default: res = ~a_q;                       // OP_NOT
        endcase
      end
      default: begin                                 // FU_ICON
        case (op_q)
          OP_SEXT8:  res = {{(DATA_W-8){a_q[7]}}, a_q[7:0]};
          OP_SEXT16: res = {{(DATA_W-16){a_q[15]}}, a_q[15:0]};
          OP_ZEXT8:  res = {{(DATA_W-8){1'b0}}, a_q[7:0]};
          default:   res = {{(DATA_W-16){1'b0}}, a_q[15:0]};   // OP_ZEXT16
        endcase
      end
    endcase
  end

  data_t res_f;
  assign res_f       = res ^ (done ? inj_mask : '0);
  assign done_result = res_f;
  assign done_flags  = '{z: (res_f == '0), n: res_f[DATA_W-1], c: c_f, v: v_f};

  initial assert (LATENCY >= 2) else $error("refu_fu: LATENCY must be at least 2");
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("refu_fu: start while busy");

endmodule
