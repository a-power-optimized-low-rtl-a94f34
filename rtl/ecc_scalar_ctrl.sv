// ecc_scalar_ctrl: top-level controller, scalar multiplication Q = k*P by
// double-and-always-add.
//
// After a start it loads the inputs into the data-path, finds the most
// significant 1 of k (one bit per clock), sets Q = P and then, for every
// lower bit of k, always runs the same sequence of point routines:
//     T = 2Q;  Q = T;  T = Q + P;  then Q = T if the bit is 1, or the same
//     two register moves into a scratch word if it is 0.
// A point addition is thus performed for every bit, whatever its value, so
// the sequence of operations (and its duration) does not reveal the key
// bits; this is the protection against simple power analysis the published design
// names.  Finally Q is converted back to ordinary coordinates.
//
// The double-and-always-add method is from the published design.  Skipping leading
// zero bits, the dummy move for a 0 bit and the k = 0 flag are this
// design's own.  The affine formulas have no point at infinity: k = 0 is
// reported on k_zero, and intermediate results equal to +/-P or to the
// point at infinity (possible only when k is a multiple of a small
// multiple of the point order) are not detected.
//
// Interface: with busy low, pulse start with k valid (it is captured).  A
// one-clock load strobe to the data-path follows at once.  done pulses one
// clock after the final routine completes.
module ecc_scalar_ctrl
  import ecc_pkg::*;
#(
  parameter int unsigned N = 192
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [N-1:0]  k,
  output logic          busy,
  output logic          done,
  output logic          k_zero,
  // data-path input load
  output logic          dp_load,
  // point controller
  output logic          pc_start,
  output routine_e      pc_routine,
  input  logic          pc_done
);

  localparam int unsigned IW = $clog2(N);

  typedef enum logic [2:0] { C_IDLE, C_SCAN, C_CALL, C_WAIT, C_DONE } cstate_e;
  typedef enum logic [2:0] { ST_INIT, ST_DBL, ST_DKEEP, ST_ADD, ST_SEL, ST_FINAL } step_e;

  cstate_e       st;
  step_e         step;
  logic [N-1:0]  k_q;
  logic [IW-1:0] idx;

  assign busy     = (st != C_IDLE);
  assign dp_load  = (st == C_IDLE) && start;
  assign pc_start = (st == C_CALL);

  always_comb begin
    unique case (step)
      ST_INIT:  pc_routine = RT_INIT;
      ST_DBL:   pc_routine = RT_DBL;
      ST_DKEEP: pc_routine = RT_KEEP;
      ST_ADD:   pc_routine = RT_ADD;
      ST_SEL:   pc_routine = k_q[idx] ? RT_KEEP : RT_DUMMY;
      default:  pc_routine = RT_FINAL;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= C_IDLE;
      step   <= ST_INIT;
      k_q    <= '0;
      idx    <= '0;
      done   <= 1'b0;
      k_zero <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        C_IDLE: if (start) begin
          k_q    <= k;
          idx    <= IW'(N-1);
          k_zero <= 1'b0;
          st     <= C_SCAN;
        end
        C_SCAN: begin
          if (k_q[idx]) begin
            step <= ST_INIT;
            st   <= C_CALL;
          end else if (idx == '0) begin
            k_zero <= 1'b1;
            st     <= C_DONE;
          end else begin
            idx <= idx - 1'b1;
          end
        end
        C_CALL: st <= C_WAIT;
        C_WAIT: if (pc_done) begin
          st <= C_CALL;
          unique case (step)
            ST_INIT, ST_SEL: begin
              if (idx == '0) step <= ST_FINAL;
              else begin idx <= idx - 1'b1; step <= ST_DBL; end
            end
            ST_DBL:   step <= ST_DKEEP;
            ST_DKEEP: step <= ST_ADD;
            ST_ADD:   step <= ST_SEL;
            default:  st   <= C_DONE;       // ST_FINAL
          endcase
        end
        C_DONE: begin
          done <= 1'b1;
          st   <= C_IDLE;
        end
        default: st <= C_IDLE;
      endcase
    end
  end

endmodule
