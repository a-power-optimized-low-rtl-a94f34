// ecc_processor: low-energy prime-field elliptic-curve scalar multiplier.
//
// Computes Q = k*P on y^2 = x^3 + a*x + b over GF(p) for any odd prime p
// below 2^N, in affine coordinates, by double-and-always-add.  The curve
// is not fixed in hardware: p, a and the conversion constant R^2 mod p
// (R = 2^(N+2)) are inputs, so different curves run on the same circuit.
// b is not needed by the point formulas.
//
// Structure: ecc_scalar_ctrl walks the key bits and calls routines of
// ecc_point_ctrl (point doubling, point addition, moves, domain
// conversion), which steps ecc_datapath through micro-operations on the
// Montgomery multiplier, the single-adder adder/subtractor and the modular
// inverse.  The adder/subtractor uses one adder over two clocks per modular
// operation, the power-reducing variant of the unit.
//
// Interface: set p, a, r2 (= 2^(2N+4) mod p), k, px, py, then pulse start
// while busy is low.  The inputs may change after the start clock.  done
// pulses when qx, qy hold k*P (or k_zero is set for k = 0); they stay
// valid until the next start.  phase shows what the data-path is doing
// (inverse calculation, inverse halving, other work, idle), the split in
// which the power profile of the published processor is reported.  For
// N = 192 one multiplication takes about 630,000 clocks, depending on the
// key and on the data-dependent inverse.
module ecc_processor
  import ecc_pkg::*;
#(
  parameter int unsigned N = 192
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [N-1:0]  p,
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  r2,
  input  logic [N-1:0]  k,
  input  logic [N-1:0]  px,
  input  logic [N-1:0]  py,
  output logic          busy,
  output logic          done,
  output logic          k_zero,
  output logic [N-1:0]  qx,
  output logic [N-1:0]  qy,
  output phase_e        phase
);

  logic      dp_load, pc_start, pc_done, pc_busy;
  routine_e  pc_routine;
  logic      dp_start, dp_busy, dp_done;
  dp_op_e    dp_op;
  raddr_t    dp_dst, dp_srca, dp_srcb;
  logic [N-1:0] p_q;

  // p is held for the whole operation.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                p_q <= '0;
    else if (start && !busy)   p_q <= p;
  end

  ecc_scalar_ctrl #(.N(N)) u_scalar (
    .clk, .rst_n, .start, .k, .busy, .done, .k_zero,
    .dp_load, .pc_start, .pc_routine, .pc_done
  );

  ecc_point_ctrl u_point (
    .clk, .rst_n, .start(pc_start), .routine(pc_routine),
    .busy(pc_busy), .done(pc_done),
    .dp_start, .dp_op, .dp_dst, .dp_srca, .dp_srcb, .dp_done
  );

  ecc_datapath #(.N(N)) u_dp (
    .clk, .rst_n, .p(p_q),
    .start(dp_start), .op(dp_op), .dst(dp_dst), .srca(dp_srca), .srcb(dp_srcb),
    .busy(dp_busy), .done(dp_done), .phase,
    .load(dp_load), .ld_px(px), .ld_py(py), .ld_a(a), .ld_r2(r2),
    .q_x(qx), .q_y(qy)
  );

  // Handshake rules between the controllers and the data-path.
  a_pc_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                    pc_start |-> !pc_busy)
    else $error("routine started while the point controller is busy");
  a_dp_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                    dp_start |-> !dp_busy)
    else $error("micro-operation started while the data-path is busy");
  a_load_idle:     assert property (@(posedge clk) disable iff (!rst_n)
                                    dp_load |-> !dp_busy && !pc_busy)
    else $error("inputs loaded during an operation");

endmodule
