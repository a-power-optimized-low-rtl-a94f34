// tb_ecc_datapath: drives the data-path with random micro-operations at
// N = 192 (P-192 prime) and checks every written register against a model
// kept here with wide-integer reference arithmetic.  OP_MUL is checked as
// dst * 2^(N+2) = srca * srcb (mod p), OP_INV as dst * srca = 2^(N+2).  The multiplication latency (N+2
// steps in the multiplier, 2 in the adder unit, plus the start clock) and
// the 2-clock modular addition are checked as well.
module tb_ecc_datapath;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  localparam int unsigned N = 192;
  localparam fe_t P192 = 192'hfffffffffffffffffffffffffffffffeffffffffffffffff;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] p;
  logic start = 1'b0;
  dp_op_e op;
  raddr_t dst, srca, srcb;
  logic busy, done, load = 1'b0;
  phase_e phase;
  logic [N-1:0] ld_px, ld_py, ld_a, ld_r2, q_x, q_y;
  fe_t model [NREGS];
  fe_t rinv;
  int checks = 0, failures = 0;
  int nops [8];

  always #5 clk = ~clk;

  ecc_datapath #(.N(N)) dut (.*);

  initial begin
    repeat (3000000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic exec(input dp_op_e o, input raddr_t d, input raddr_t s1, input raddr_t s2);
    int cyc;
    fe_t expv;
    op = o; dst = d; srca = s1; srcb = s2;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    unique case (o)
      OP_ADD: expv = fadd(model[s1], model[s2], P192);
      OP_SUB: expv = fsub(model[s1], model[s2], P192);
      OP_MUL: expv = fmul(fmul(model[s1], model[s2], P192), rinv, P192);
      OP_INV: expv = fmul(finv(model[s1], P192), fpow2(N + 2, P192), P192);
      default: expv = model[s1];
    endcase
    model[d] = expv;
    nops[o]++;
    @(negedge clk);
    checks++;
    if (dut.u_rf.mem[d] != expv) begin
      failures++; $display("%s r%0d: got %h expected %h", o.name(), d, dut.u_rf.mem[d], expv);
    end
    if (o == OP_MUL || o == OP_ADD || o == OP_SUB) begin
      checks++;
      if (cyc != ((o == OP_MUL) ? N + 5 : 2)) begin
        failures++; $display("%s latency %0d", o.name(), cyc);
      end
    end
  endtask

  initial begin
    dp_op_e ops [5] = '{OP_ADD, OP_SUB, OP_MUL, OP_INV, OP_MOV};
    p = P192; op = OP_NOP; dst = '0; srca = '0; srcb = '0;
    rinv = finv(fpow2(N + 2, P192), P192);
    ld_px = frand(P192); ld_py = frand(P192); ld_a = frand(P192); ld_r2 = frand(P192);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NREGS; i++) model[i] = '0;
    @(negedge clk) load = 1'b1;
    @(negedge clk) load = 1'b0;
    model[R_PX] = ld_px; model[R_PY] = ld_py; model[R_A] = ld_a; model[R_R2] = ld_r2;
    model[R_ONE] = fe_t'(1);
    // fill every register with a nonzero value
    for (int i = 0; i < NREGS; i++)
      if (model[i] == '0) exec(OP_ADD, raddr_t'(i), R_PX, R_ONE);
    for (int i = 0; i < 400; i++) begin
      dp_op_e o;
      raddr_t d, s1, s2;
      o  = ops[$urandom_range(4)];
      d  = raddr_t'($urandom_range(NREGS - 1));
      s1 = raddr_t'($urandom_range(NREGS - 1));
      s2 = raddr_t'($urandom_range(NREGS - 1));
      if (o == OP_INV && model[s1] == '0) o = OP_ADD;
      if (model[s1] == '0 || model[s2] == '0) o = OP_ADD;
      exec(o, d, s1, s2);
      checks++;
      if (q_x != model[R_QX] || q_y != model[R_QY]) begin failures++; $display("q ports wrong"); end
    end
    $display("ops: add %0d sub %0d mul %0d inv %0d mov %0d", nops[OP_ADD], nops[OP_SUB], nops[OP_MUL], nops[OP_INV], nops[OP_MOV]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
