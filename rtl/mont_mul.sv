// mont_mul: bit-serial Montgomery multiplier, M = A * B * 2^-(N+2) mod p.
//
// One bit of B is consumed per clock, least significant first, from a shift
// register.  In each step the AND-gated multiplicand (A if the current bit
// of B is 1, else 0) is added to the previous partial result M(i-1); the
// second adder then adds 0 or p, chosen by the least significant bit of that
// sum so that the total is even, and the result is shifted right by one to
// give M(i).  After N+2 steps M = A*B*2^-(N+2) mod p, in the range [0, 2p)
// for A, B < p; no final subtraction is done here (the data-path reduces the
// result with the adder/subtractor unit).  The register holding M is the
// "Mult. REG (M)" of the data-path and is kept inside this module.
//
// The structure (AND gate, two adders, 0/p multiplexer, right shift, N+2
// steps) follows the published design.  The start/done handshake, the step counter
// and the reset values are this design's own.
//
// Interface: pulse start for one clock with a, b and p valid; a and p must
// stay stable while busy.  One step is taken per clock; the N+2-th clock
// edge after the one that samples start performs the last step and raises
// done for one cycle; m then holds the product until the next start.
module mont_mul #(
  parameter int unsigned N = 192          // field size in bits
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N-1:0]   a,               // multiplicand, < p
  input  logic [N-1:0]   b,               // multiplier, < p
  input  logic [N-1:0]   p,               // odd modulus
  output logic [N:0]     m,               // result, < 2p
  output logic           busy,
  output logic           done
);

  localparam int unsigned STEPS = N + 2;
  localparam int unsigned CW    = $clog2(STEPS + 1);

  logic [N+1:0]  b_sr;                    // B shift register, N+2 bits
  logic [CW-1:0] cnt;
  logic [N+1:0]  sum1, sum2;

  // First adder: M(i-1) + (A AND b_i); second adder: + (0 or p).
  always_comb begin
    sum1 = {1'b0, m} + ({(N+2){b_sr[0]}} & {2'b00, a});
    sum2 = sum1 + (sum1[0] ? {2'b00, p} : '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m    <= '0;
      b_sr <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        m    <= '0;
        b_sr <= {2'b00, b};
        cnt  <= CW'(STEPS);
        busy <= 1'b1;
      end else if (busy) begin
        m    <= sum2[N+1:1];
        b_sr <= b_sr >> 1;
        cnt  <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // Adding 0 or p always makes the sum even, so the shift drops nothing.
  a_even: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !sum2[0])
    else $error("Montgomery step left an odd sum");

endmodule
