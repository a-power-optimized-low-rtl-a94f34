// ecc_pkg: types and constants shared by the prime-field ECC processor.
//
// The processor computes a scalar multiplication k*P on a short Weierstrass
// curve y^2 = x^3 + a*x + b over GF(p), in affine coordinates, with the
// double-and-always-add method.  Arithmetic is done in the Montgomery domain
// with R = 2^(N+2), which is the factor the bit-serial multiplier removes.
//
// This package holds the datapath micro-operation encoding, the layout of
// the working register file and the phase code that tells which part of the
// computation the data-path is busy with (inverse calculation, inverse
// halving, or the rest).  The phase split follows the published design; the
// encodings and the register layout are this design's own.
package ecc_pkg;

  // Micro-operations executed by the data-path.
  typedef enum logic [2:0] {
    OP_NOP  = 3'd0,
    OP_ADD  = 3'd1,   // dst = (srca + srcb) mod p
    OP_SUB  = 3'd2,   // dst = (srca - srcb) mod p
    OP_MUL  = 3'd3,   // dst = srca * srcb * 2^-(N+2) mod p, fully reduced
    OP_INV  = 3'd4,   // dst = srca^-1 * 2^(N+2) mod p
    OP_MOV  = 3'd5    // dst = srca
  } dp_op_e;

  // Adder/subtractor unit commands.
  typedef enum logic [1:0] {
    AS_ADD  = 2'd0,   // plain A + B
    AS_SUB  = 2'd1,   // plain A - B
    AS_MADD = 2'd2,   // (A + B) mod p, two cycles
    AS_MSUB = 2'd3    // (A - B) mod p, two cycles
  } as_op_e;

  // Power-profile phases of the computation.
  typedef enum logic [1:0] {
    PH_IDLE     = 2'd0,
    PH_REST     = 2'd1,
    PH_INV_CALC = 2'd2,
    PH_INV_HALV = 2'd3
  } phase_e;

  // Register file layout (word addresses).
  localparam int unsigned NREGS  = 12;
  localparam int unsigned RA_W   = 4;
  typedef logic [RA_W-1:0] raddr_t;

  localparam raddr_t R_PX  = 4'd0;   // base point x (Montgomery form)
  localparam raddr_t R_PY  = 4'd1;   // base point y
  localparam raddr_t R_QX  = 4'd2;   // accumulator x
  localparam raddr_t R_QY  = 4'd3;   // accumulator y
  localparam raddr_t R_TX  = 4'd4;   // point-operation result x
  localparam raddr_t R_TY  = 4'd5;   // point-operation result y
  localparam raddr_t R_A   = 4'd6;   // curve coefficient a
  localparam raddr_t R_R2  = 4'd7;   // R^2 mod p (domain conversion constant)
  localparam raddr_t R_ONE = 4'd8;   // constant 1
  localparam raddr_t R_T0  = 4'd9;   // scratch
  localparam raddr_t R_T1  = 4'd10;  // scratch
  localparam raddr_t R_T2  = 4'd11;  // scratch / dummy destination

  // Routines the scalar controller asks the point controller to run.
  typedef enum logic [2:0] {
    RT_INIT  = 3'd0,  // convert P and a into Montgomery form, Q = P
    RT_DBL   = 3'd1,  // T = 2Q
    RT_ADD   = 3'd2,  // T = Q + P
    RT_KEEP  = 3'd3,  // Q = T (key bit 1 or after doubling)
    RT_DUMMY = 3'd4,  // T copied to scratch (key bit 0), same cost as RT_KEEP
    RT_FINAL = 3'd5   // convert Q back to ordinary form
  } routine_e;

endpackage
