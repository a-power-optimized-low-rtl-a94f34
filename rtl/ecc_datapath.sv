// ecc_datapath: the processor's data-path, executing one micro-operation at
// a time on the working register file.
//
// It joins the operand multiplexer and registers (ecc_regfile), the
// bit-serial Montgomery multiplier (mont_mul), the single-adder
// adder/subtractor with reduction (addsub_mod) and the modular inverse
// controller (mont_inv), which borrows the adder unit while it runs.
// Micro-operations (ecc_pkg::dp_op_e):
//   OP_ADD / OP_SUB  dst = srca +/- srcb mod p       2 clocks
//   OP_MUL           dst = srca*srcb*2^-(N+2) mod p  N+5 clocks: the start
//                    clock, N+2 multiplier steps, then 2 clocks in the adder
//                    unit, which adds 0 modulo p to bring the product from
//                    [0, 2p) to [0, p)
//   OP_INV           dst = srca^-1 * 2^(N+2) mod p   data dependent (the
//                    Montgomery inverse; for a Montgomery-domain input
//                    a*R this is a^-1 in ordinary form)
//   OP_MOV           dst = srca                      2 clocks
// (clocks counted from the one that samples start to the one whose edge
// writes dst, inclusive).
// Every operand and result is a field element below p.
//
// The arrangement of multiplier, adder unit, their result registers and
// the operand multiplexer follows the published design's data-path figure.  The
// micro-operation set, the final reduction of products through the adder
// unit, and the handshake are this design's own.
//
// Interface: with busy low, pulse start for one clock with op, dst, srca,
// srcb valid and held until done.  done pulses for one clock in the cycle
// whose closing clock edge writes dst; the next micro-operation may start
// in the following cycle.  load writes P, a and R^2 mod p into the register
// file (only while idle).  phase reports inverse calculation, inverse
// halving, or other work.
module ecc_datapath
  import ecc_pkg::*;
#(
  parameter int unsigned N = 192
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  p,
  // micro-operation
  input  logic          start,
  input  dp_op_e        op,
  input  raddr_t        dst,
  input  raddr_t        srca,
  input  raddr_t        srcb,
  output logic          busy,
  output logic          done,
  output phase_e        phase,
  // operation inputs and result
  input  logic          load,
  input  logic [N-1:0]  ld_px,
  input  logic [N-1:0]  ld_py,
  input  logic [N-1:0]  ld_a,
  input  logic [N-1:0]  ld_r2,
  output logic [N-1:0]  q_x,
  output logic [N-1:0]  q_y
);

  localparam int unsigned W = N + 2;

  typedef enum logic [2:0] { D_IDLE, D_AS, D_MM, D_INV, D_MOV, D_NOP } dstate_e;

  dstate_e       st;
  raddr_t        dst_q;

  logic [N-1:0]  rd_a, rd_b;
  logic          we;
  logic [N-1:0]  wd;

  // multiplier
  logic          mm_start, mm_busy, mm_done;
  logic [N:0]    mm_m;

  // adder unit and the requests of its two users
  logic          as_start, as_carry, as_done;
  as_op_e        as_op;
  logic [W-1:0]  as_a, as_b, as_res;
  logic          dp_as_start;
  as_op_e        dp_as_op;
  logic [W-1:0]  dp_as_a, dp_as_b;

  // inverse
  logic          inv_start, inv_busy, inv_done;
  logic [N-1:0]  inv_r;
  phase_e        inv_phase;
  logic          iv_as_start;
  as_op_e        iv_as_op;
  logic [W-1:0]  iv_as_a, iv_as_b;

  ecc_regfile #(.N(N)) u_rf (
    .clk, .rst_n,
    .ra_a(srca), .ra_b(srcb), .rd_a, .rd_b,
    .we, .wa(dst_q), .wd,
    .load, .ld_px, .ld_py, .ld_a, .ld_r2,
    .q_x, .q_y
  );

  mont_mul #(.N(N)) u_mul (
    .clk, .rst_n, .start(mm_start), .a(rd_a), .b(rd_b), .p,
    .m(mm_m), .busy(mm_busy), .done(mm_done)
  );

  addsub_mod #(.N(N), .W(W)) u_as (
    .clk, .rst_n, .start(as_start), .op(as_op), .a(as_a), .b(as_b), .p,
    .res(as_res), .carry(as_carry), .done(as_done)
  );

  mont_inv #(.N(N), .W(W)) u_inv (
    .clk, .rst_n, .start(inv_start), .a(rd_a), .p,
    .r_out(inv_r), .busy(inv_busy), .done(inv_done), .phase(inv_phase),
    .as_start(iv_as_start), .as_op(iv_as_op), .as_a(iv_as_a), .as_b(iv_as_b),
    .as_res, .as_carry, .as_done
  );

  // The inverse owns the adder unit while it runs.
  always_comb begin
    if (inv_busy) begin
      as_start = iv_as_start; as_op = iv_as_op; as_a = iv_as_a; as_b = iv_as_b;
    end else begin
      as_start = dp_as_start; as_op = dp_as_op; as_a = dp_as_a; as_b = dp_as_b;
    end
  end

  // Issue logic.
  always_comb begin
    dp_as_start = 1'b0;
    dp_as_op    = AS_MADD;
    dp_as_a     = '0;
    dp_as_b     = '0;
    mm_start    = 1'b0;
    inv_start   = 1'b0;
    if (st == D_IDLE && start) begin
      unique case (op)
        OP_ADD: begin dp_as_start = 1'b1; dp_as_op = AS_MADD; dp_as_a = W'(rd_a); dp_as_b = W'(rd_b); end
        OP_SUB: begin dp_as_start = 1'b1; dp_as_op = AS_MSUB; dp_as_a = W'(rd_a); dp_as_b = W'(rd_b); end
        OP_MUL: mm_start  = 1'b1;
        OP_INV: inv_start = 1'b1;
        default: ;
      endcase
    end else if (st == D_MM && mm_done) begin
      // final reduction of the product: (M + 0) mod p
      dp_as_start = 1'b1; dp_as_op = AS_MADD; dp_as_a = W'(mm_m); dp_as_b = '0;
    end
  end

  // Result write-back.
  always_comb begin
    we   = 1'b0;
    wd   = '0;
    done = 1'b0;
    unique case (st)
      D_AS:  if (as_done)  begin we = 1'b1; wd = as_res[N-1:0]; done = 1'b1; end
      D_INV: if (inv_done) begin we = 1'b1; wd = inv_r;         done = 1'b1; end
      D_MOV: begin we = 1'b1; wd = rd_a; done = 1'b1; end
      D_NOP: done = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= D_IDLE;
      dst_q <= '0;
    end else begin
      unique case (st)
        D_IDLE: if (start) begin
          dst_q <= dst;
          unique case (op)
            OP_ADD, OP_SUB: st <= D_AS;
            OP_MUL:         st <= D_MM;
            OP_INV:         st <= D_INV;
            OP_MOV:         st <= D_MOV;
            default:        st <= D_NOP;
          endcase
        end
        D_MM:  if (mm_done)  st <= D_AS;
        D_AS:  if (as_done)  st <= D_IDLE;
        D_INV: if (inv_done) st <= D_IDLE;
        default: st <= D_IDLE;
      endcase
    end
  end

  assign busy  = (st != D_IDLE);

  // The units are only started when idle, and never by both users at once.
  a_mm_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                    mm_start |-> !mm_busy)
    else $error("multiplier restarted while busy");
  a_as_one_user:   assert property (@(posedge clk) disable iff (!rst_n)
                                    !(dp_as_start && inv_busy))
    else $error("adder unit requested by the data-path during an inverse");
  a_load_idle:     assert property (@(posedge clk) disable iff (!rst_n)
                                    load |-> st == D_IDLE)
    else $error("load during a micro-operation");
  assign phase = inv_busy ? inv_phase : (busy ? PH_REST : PH_IDLE);

endmodule
