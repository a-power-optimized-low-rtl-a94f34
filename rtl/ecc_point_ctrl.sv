// ecc_point_ctrl: lower-level controller for point addition and doubling.
//
// A small microcode sequencer.  Each routine is a fixed list of data-path
// micro-operations, stepped through one at a time: the controller issues a
// micro-operation, waits for the data-path's done, and moves on until the
// routine's last entry.  All values are in the Montgomery domain
// (x~ = x*R mod p, R = 2^(N+2)).  The routines:
//   RT_DBL   T = 2Q:  d = 2*y1, lambda = (3*x1^2 + a)/d
//   RT_ADD   T = Q+P: d = x2 - x1, lambda = (y2 - y1)/d
//            in both, x3 = lambda^2 - x1 - x2 (x2 = x1 when doubling) and
//            y3 = lambda*(x1 - x3) - y1.  The denominator is formed first
//            in the adder unit, then inverted; the Montgomery inverse of the
//            Montgomery value d~ = d*R is d~^-1 * R = d^-1, and one
//            multiplication by R^2 mod p turns it into d^-1*R.
//   RT_INIT  convert P and a into the Montgomery domain, Q = P
//   RT_KEEP  Q = T;  RT_DUMMY  the same two moves into a scratch word
//   RT_FINAL convert Q back to ordinary coordinates (multiply by 1)
//
// The point formulas and the order "denominator, inverse, the rest" follow
// the published design.  The microcode itself, the register allocation and the
// domain conversions are this design's own.
//
// Interface: with busy low, pulse start with routine valid; done pulses
// for one clock in the cycle the routine's last micro-operation completes.
module ecc_point_ctrl
  import ecc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  routine_e  routine,
  output logic      busy,
  output logic      done,
  // data-path micro-operation port
  output logic      dp_start,
  output dp_op_e    dp_op,
  output raddr_t    dp_dst,
  output raddr_t    dp_srca,
  output raddr_t    dp_srcb,
  input  logic      dp_done
);

  typedef struct packed {
    dp_op_e op;
    raddr_t dst;
    raddr_t srca;
    raddr_t srcb;
    logic   last;
  } uinstr_t;

  localparam int unsigned PCW = 6;
  typedef logic [PCW-1:0] pc_t;

  function automatic pc_t entry(routine_e rt);
    unique case (rt)
      RT_INIT:  return pc_t'(0);
      RT_DBL:   return pc_t'(5);
      RT_ADD:   return pc_t'(19);
      RT_KEEP:  return pc_t'(30);
      RT_DUMMY: return pc_t'(32);
      RT_FINAL: return pc_t'(34);
      default:  return pc_t'(36);
    endcase
  endfunction

  function automatic uinstr_t rom(pc_t pc);
    unique case (pc)
      // RT_INIT
      6'd0:  return '{OP_MUL, R_PX, R_PX, R_R2, 1'b0};
      6'd1:  return '{OP_MUL, R_PY, R_PY, R_R2, 1'b0};
      6'd2:  return '{OP_MUL, R_A,  R_A,  R_R2, 1'b0};
      6'd3:  return '{OP_MOV, R_QX, R_PX, R_PX, 1'b0};
      6'd4:  return '{OP_MOV, R_QY, R_PY, R_PY, 1'b1};
      // RT_DBL
      6'd5:  return '{OP_ADD, R_T0, R_QY, R_QY, 1'b0};   // 2*y1
      6'd6:  return '{OP_INV, R_T0, R_T0, R_T0, 1'b0};
      6'd7:  return '{OP_MUL, R_T0, R_T0, R_R2, 1'b0};   // 1/d, Montgomery form
      6'd8:  return '{OP_MUL, R_T1, R_QX, R_QX, 1'b0};   // x1^2
      6'd9:  return '{OP_ADD, R_T2, R_T1, R_T1, 1'b0};
      6'd10: return '{OP_ADD, R_T1, R_T2, R_T1, 1'b0};   // 3*x1^2
      6'd11: return '{OP_ADD, R_T1, R_T1, R_A,  1'b0};   // + a
      6'd12: return '{OP_MUL, R_T0, R_T1, R_T0, 1'b0};   // lambda
      6'd13: return '{OP_MUL, R_T1, R_T0, R_T0, 1'b0};   // lambda^2
      6'd14: return '{OP_SUB, R_T1, R_T1, R_QX, 1'b0};
      6'd15: return '{OP_SUB, R_TX, R_T1, R_QX, 1'b0};   // x3
      6'd16: return '{OP_SUB, R_T1, R_QX, R_TX, 1'b0};   // x1 - x3
      6'd17: return '{OP_MUL, R_T1, R_T0, R_T1, 1'b0};
      6'd18: return '{OP_SUB, R_TY, R_T1, R_QY, 1'b1};   // y3
      // RT_ADD
      6'd19: return '{OP_SUB, R_T0, R_PX, R_QX, 1'b0};   // x2 - x1
      6'd20: return '{OP_INV, R_T0, R_T0, R_T0, 1'b0};
      6'd21: return '{OP_MUL, R_T0, R_T0, R_R2, 1'b0};   // 1/d, Montgomery form
      6'd22: return '{OP_SUB, R_T1, R_PY, R_QY, 1'b0};   // y2 - y1
      6'd23: return '{OP_MUL, R_T0, R_T1, R_T0, 1'b0};   // lambda
      6'd24: return '{OP_MUL, R_T1, R_T0, R_T0, 1'b0};   // lambda^2
      6'd25: return '{OP_SUB, R_T1, R_T1, R_QX, 1'b0};
      6'd26: return '{OP_SUB, R_TX, R_T1, R_PX, 1'b0};   // x3
      6'd27: return '{OP_SUB, R_T1, R_QX, R_TX, 1'b0};   // x1 - x3
      6'd28: return '{OP_MUL, R_T1, R_T0, R_T1, 1'b0};
      6'd29: return '{OP_SUB, R_TY, R_T1, R_QY, 1'b1};   // y3
      // RT_KEEP
      6'd30: return '{OP_MOV, R_QX, R_TX, R_TX, 1'b0};
      6'd31: return '{OP_MOV, R_QY, R_TY, R_TY, 1'b1};
      // RT_DUMMY
      6'd32: return '{OP_MOV, R_T2, R_TX, R_TX, 1'b0};
      6'd33: return '{OP_MOV, R_T2, R_TY, R_TY, 1'b1};
      // RT_FINAL
      6'd34: return '{OP_MUL, R_QX, R_QX, R_ONE, 1'b0};
      6'd35: return '{OP_MUL, R_QY, R_QY, R_ONE, 1'b1};
      default: return '{OP_NOP, R_T2, R_T2, R_T2, 1'b1};
    endcase
  endfunction

  typedef enum logic [1:0] { P_IDLE, P_ISSUE, P_WAIT } pstate_e;

  pstate_e  st;
  pc_t      pc;
  uinstr_t  ui;

  assign ui       = rom(pc);
  assign dp_start = (st == P_ISSUE);
  assign dp_op    = ui.op;
  assign dp_dst   = ui.dst;
  assign dp_srca  = ui.srca;
  assign dp_srcb  = ui.srcb;
  assign busy     = (st != P_IDLE);
  assign done     = (st == P_WAIT) && dp_done && ui.last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= P_IDLE;
      pc <= '0;
    end else begin
      unique case (st)
        P_IDLE:  if (start) begin pc <= entry(routine); st <= P_ISSUE; end
        P_ISSUE: st <= P_WAIT;
        P_WAIT:  if (dp_done) begin
          if (ui.last) st <= P_IDLE;
          else begin pc <= pc + 1'b1; st <= P_ISSUE; end
        end
        default: st <= P_IDLE;
      endcase
    end
  end

endmodule
