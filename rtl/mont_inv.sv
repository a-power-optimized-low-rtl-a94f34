// mont_inv: Montgomery modular inverse, r = a^-1 * 2^M mod p, for odd prime p.
//
// The inverse runs in two phases, which the published design names and
// whose power it reports separately:
//   calculation phase - the binary "almost Montgomery inverse": starting
//     from u = p, v = a, r = 0, s = 1, k = 0, each step halves whichever of
//     u, v is even, or, when both are odd, replaces the larger by half their
//     difference and adds r and s, until v = 0.  Then r (reduced below p and
//     negated) equals a^-1 * 2^k mod p, with N <= k <= 2N.
//   halving phase - r is divided by 2 modulo p, k - M times: an even r is
//     shifted right, an odd r first has p added.  The result is
//     a^-1 * 2^M mod p.  With M = N+2 (the default) and a Montgomery-domain
//     input a~ = a*2^(N+2), the result a~^-1 * 2^(N+2) is a^-1 itself, so a
//     single Montgomery multiplication by R^2 mod p puts it back into the
//     Montgomery domain.  When k < M (only possible if p is much shorter
//     than N bits, or when k just misses M) r is doubled modulo p M - k
//     times instead, in the same phase.
// All additions, subtractions and comparisons go through the shared
// adder/subtractor unit in its plain (non-modular) mode, through the as_*
// ports; halving and doubling are wiring.  The four working values u, v, r,
// s and the step count k are registers of this controller.
//
// The two phases, the use of the adder unit in plain mode and the name of
// the algorithm are from the published design; the step-by-step procedure is the
// textbook form of that algorithm, and the state machine, register widths,
// the doubling fallback and the handshake are this design's own.  The
// multiplication by R^2 mod p that completes the conversion is issued by
// the point controller, not by this module.
//
// Interface: pulse start with a and p valid; both must stay stable while
// busy.  done pulses once r holds the result.  phase tells which phase is
// running.  Latency is data dependent: each calculation step takes 1 clock
// (an even operand) or 4 to 5 clocks (both odd), each halving step 1 clock
// (even r) or 2 clocks (odd r), each doubling step 3 clocks.
module mont_inv
  import ecc_pkg::*;
#(
  parameter int unsigned N = 192,
  parameter int unsigned W = N + 2,
  parameter int unsigned M = N + 2        // exponent of the output factor
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  p,
  output logic [N-1:0]  r_out,
  output logic          busy,
  output logic          done,
  output phase_e        phase,
  // shared adder/subtractor unit, plain mode
  output logic          as_start,
  output as_op_e        as_op,
  output logic [W-1:0]  as_a,
  output logic [W-1:0]  as_b,
  input  logic [W-1:0]  as_res,
  input  logic          as_carry,
  input  logic          as_done
);

  localparam int unsigned KW = $clog2(2*N + M + 2);

  typedef enum logic [3:0] {
    S_IDLE, S_LOOP, S_CMP, S_VU, S_RS, S_SR,
    S_FIX1, S_WFIX1, S_FIX2, S_WFIX2, S_HALVE, S_WHALVE, S_WDBL
  } state_e;

  state_e        st;
  logic [W-1:0]  u, v, r, s;
  logic [KW-1:0] k;

  assign r_out = r[N-1:0];
  assign busy  = (st != S_IDLE);

  always_comb begin
    unique case (st)
      S_IDLE:            phase = PH_IDLE;
      S_HALVE, S_WHALVE, S_WDBL: phase = PH_INV_HALV;
      default:           phase = PH_INV_CALC;
    endcase
  end

  // Adder requests, issued combinationally from the current state.
  always_comb begin
    as_start = 1'b0;
    as_op    = AS_ADD;
    as_a     = '0;
    as_b     = '0;
    unique case (st)
      S_LOOP: if (v != '0 && u[0] && v[0]) begin
        as_start = 1'b1; as_op = AS_SUB; as_a = u; as_b = v;          // u - v
      end
      S_CMP: if (as_done) begin
        as_start = 1'b1;
        if (as_carry && as_res != '0) begin
          as_op = AS_ADD; as_a = r; as_b = s;                          // r + s
        end else begin
          as_op = AS_SUB; as_a = v; as_b = u;                          // v - u
        end
      end
      S_VU: if (as_done) begin
        as_start = 1'b1; as_op = AS_ADD; as_a = s; as_b = r;          // s + r
      end
      S_FIX1: begin
        as_start = 1'b1; as_op = AS_SUB; as_a = r; as_b = W'(p);      // r - p
      end
      S_FIX2: begin
        as_start = 1'b1; as_op = AS_SUB; as_a = W'(p); as_b = r;      // p - r
      end
      S_HALVE: if (k > KW'(M) && r[0]) begin
        as_start = 1'b1; as_op = AS_ADD; as_a = r; as_b = W'(p);      // r + p
      end else if (k < KW'(M)) begin
        as_start = 1'b1; as_op = AS_MADD; as_a = r; as_b = r;         // 2r mod p
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= S_IDLE;
      u    <= '0;
      v    <= '0;
      r    <= '0;
      s    <= '0;
      k    <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          u  <= W'(p);
          v  <= W'(a);
          r  <= '0;
          s  <= W'(1);
          k  <= '0;
          st <= S_LOOP;
        end
        S_LOOP: begin
          if (v == '0) begin
            st <= S_FIX1;
          end else if (!u[0]) begin
            u <= u >> 1; s <= s << 1; k <= k + 1'b1;
          end else if (!v[0]) begin
            v <= v >> 1; r <= r << 1; k <= k + 1'b1;
          end else begin
            st <= S_CMP;
          end
        end
        S_CMP: if (as_done) begin
          if (as_carry && as_res != '0) begin   // u > v
            u  <= as_res >> 1;
            st <= S_RS;
          end else begin
            st <= S_VU;
          end
        end
        S_VU: if (as_done) begin                // v - u ready
          v  <= as_res >> 1;
          st <= S_SR;
        end
        S_RS: if (as_done) begin                // r + s ready
          r  <= as_res; s <= s << 1; k <= k + 1'b1;
          st <= S_LOOP;
        end
        S_SR: if (as_done) begin                // s + r ready
          s  <= as_res; r <= r << 1; k <= k + 1'b1;
          st <= S_LOOP;
        end
        S_FIX1:  st <= S_WFIX1;
        S_WFIX1: if (as_done) begin
          if (as_carry) r <= as_res;            // r >= p: r = r - p
          st <= S_FIX2;
        end
        S_FIX2:  st <= S_WFIX2;
        S_WFIX2: if (as_done) begin
          r  <= as_res;                          // r = p - r
          st <= S_HALVE;
        end
        S_HALVE: begin
          if (k == KW'(M)) begin
            done <= 1'b1;
            st   <= S_IDLE;
          end else if (k < KW'(M)) begin
            st <= S_WDBL;
          end else if (!r[0]) begin
            r <= r >> 1; k <= k - 1'b1;
          end else begin
            st <= S_WHALVE;
          end
        end
        S_WHALVE: if (as_done) begin
          r  <= as_res >> 1; k <= k - 1'b1;
          st <= S_HALVE;
        end
        S_WDBL: if (as_done) begin
          r  <= as_res; k <= k + 1'b1;
          st <= S_HALVE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
