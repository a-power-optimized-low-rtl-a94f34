// addsub_mod: adder/subtractor with modular reduction, built on one adder.
//
// The unit computes A + B, A - B (plain, one clock) and (A + B) mod p,
// (A - B) mod p (modular, two clocks).  There is a single W-bit adder with a
// carry input; subtraction adds the inverted operand with carry-in 1.
//   clock 1: Adder REG <= A +/- B, and the carry out is kept.
//   clock 2 (modular only): the same adder computes Adder REG - p (for an
//            addition) or Adder REG + p (for a subtraction that borrowed);
//            the output multiplexer keeps whichever of the two results lies
//            in [0, p).
// Using one adder over two clocks instead of two chained adders in one clock
// is the "hardware reduction" the published design applies to lower the power of
// this unit.  The plain operations serve the modular inverse.  For a modular
// addition the inputs may be up to 2p-1 each as long as their sum is below
// 2p; with B = 0 the unit reduces a value in [0, 2p) to [0, p).
//
// The operand inversion, the carry-in values and the 0/p selection follow
// the published design's figure of the unit.  The operand width (N+2 bits, room for
// the inverse's intermediate values), the command encoding and the
// start/done handshake are this design's own.
//
// Interface: pulse start for one clock with op, a, b, p valid (a and b are
// sampled then; p must stay stable).  done pulses one clock later for plain
// operations and two clocks later for modular ones.  res holds the result
// and carry the adder's carry out of the first step (for a subtraction,
// carry = 1 means A >= B) until the next start.
module addsub_mod
  import ecc_pkg::*;
#(
  parameter int unsigned N = 192,
  parameter int unsigned W = N + 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  as_op_e        op,
  input  logic [W-1:0]  a,
  input  logic [W-1:0]  b,
  input  logic [N-1:0]  p,
  output logic [W-1:0]  res,     // Adder REG
  output logic          carry,
  output logic          done
);

  logic          step2;          // second clock of a modular operation
  logic          madd;           // the pending modular op is an addition
  logic [W-1:0]  add_x, add_y;
  logic          add_ci;
  logic [W:0]    add_s;
  logic          is_sub;

  assign is_sub = (op == AS_SUB) || (op == AS_MSUB);

  // Operand selection for the single adder.
  always_comb begin
    if (step2) begin
      add_x  = res;
      add_y  = madd ? ~W'(p) : W'(p);
      add_ci = madd;
    end else begin
      add_x  = a;
      add_y  = is_sub ? ~b : b;
      add_ci = is_sub;
    end
    add_s = {1'b0, add_x} + {1'b0, add_y} + (W+1)'(add_ci);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res   <= '0;
      carry <= 1'b0;
      step2 <= 1'b0;
      madd  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (step2) begin
        step2 <= 1'b0;
        done  <= 1'b1;
        // Output multiplexer: addition keeps S - p when S >= p (no borrow);
        // subtraction adds p back when the first step borrowed.
        if (madd ? add_s[W] : !carry)
          res <= add_s[W-1:0];
      end else if (start) begin
        res   <= add_s[W-1:0];
        carry <= add_s[W];
        madd  <= (op == AS_MADD);
        if (op == AS_MADD || op == AS_MSUB)
          step2 <= 1'b1;
        else
          done  <= 1'b1;
      end
    end
  end

endmodule
