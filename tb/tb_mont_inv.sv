// tb_mont_inv: checks the modular inverse controller together with the
// adder/subtractor unit it drives, at N = 192 (P-192 prime) and with the
// 16-bit prime 65521 in the same hardware.  Each result r must satisfy
// r * a = 2^(N+2) (mod p) and r < p.  With P-192 the second phase halves
// r; with the short prime it doubles r (k < N+2).  The phase output must
// show a calculation phase followed by that second phase, in every inverse.
module tb_mont_inv;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  localparam int unsigned N = 192;
  localparam int unsigned W = N + 2;
  localparam fe_t P192 = 192'hfffffffffffffffffffffffffffffffeffffffffffffffff;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic [N-1:0] a, p, r;
  logic busy, done;
  phase_e phase;
  logic as_start, as_carry, as_done;
  as_op_e as_op;
  logic [W-1:0] as_a, as_b, as_res;
  int checks = 0, failures = 0;
  int calc_cycles = 0, halv_cycles = 0;

  always #5 clk = ~clk;

  mont_inv #(.N(N), .W(W)) dut (
    .clk, .rst_n, .start, .a, .p, .r_out(r), .busy, .done, .phase,
    .as_start, .as_op, .as_a, .as_b, .as_res, .as_carry, .as_done
  );
  addsub_mod #(.N(N), .W(W)) u_as (
    .clk, .rst_n, .start(as_start), .op(as_op), .a(as_a), .b(as_b), .p,
    .res(as_res), .carry(as_carry), .done(as_done)
  );

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input fe_t x, input fe_t pp);
    logic seen_calc, seen_halv, order_bad;
    a = x; p = pp;
    seen_calc = 1'b0; seen_halv = 1'b0; order_bad = 1'b0;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    while (!done) begin
      if (phase == PH_INV_CALC) begin seen_calc = 1'b1; if (seen_halv) order_bad = 1'b1; calc_cycles++; end
      if (phase == PH_INV_HALV) begin seen_halv = 1'b1; halv_cycles++; end
      @(negedge clk);
    end
    checks++;
    if (r >= pp || fmul(r, x, pp) != fpow2(N + 2, pp)) begin
      failures++; $display("inverse of %h: got %h", x, r);
    end
    checks++;
    if (!seen_calc || !seen_halv || order_bad) begin
      failures++; $display("phase sequence wrong for %h", x);
    end
  endtask

  initial begin
    a = '0; p = P192;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(fe_t'(1), P192);
    run(fe_t'(2), P192);
    run(P192 - 1, P192);
    for (int i = 0; i < 60; i++) run(frand(P192) | fe_t'(1), P192);
    for (int i = 0; i < 60; i++) run(frand(fe_t'(65520)) + fe_t'(1), fe_t'(65521));
    $display("clock cycles: calculation %0d, halving %0d", calc_cycles, halv_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
