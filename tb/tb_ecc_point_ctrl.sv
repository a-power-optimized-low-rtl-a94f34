// tb_ecc_point_ctrl: runs the point-operation microcode on the data-path at
// N = 192 with the NIST P-192 curve and its base point G.  The routine
// sequence INIT, DBL, KEEP, ADD, KEEP, DUMMY, ADD, DBL, DUMMY, FINAL must
// leave Q = 3G (the DUMMY routines must not touch Q), T = 4G after the
// second ADD and T = 6G after the last DBL, compared with a wide-integer
// affine reference.  A second pass does the same for a random
// point on a curve through it over a 31-bit prime.
module tb_ecc_point_ctrl;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  localparam int unsigned N = 192;
  localparam fe_t P192 = 192'hfffffffffffffffffffffffffffffffeffffffffffffffff;
  localparam fe_t GX   = 192'h188da80eb03090f67cbf20eb43a18800f4ff0afd82ff1012;
  localparam fe_t GY   = 192'h07192b95ffc8da78631011ed6b24cdd573f977a11e794811;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  routine_e routine;
  logic busy, done;
  logic dp_start, dp_done, dp_busy;
  dp_op_e dp_op;
  raddr_t dp_dst, dp_srca, dp_srcb;
  phase_e phase;
  logic [N-1:0] p, ld_px, ld_py, ld_a, ld_r2, q_x, q_y;
  logic load = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ecc_point_ctrl u_pc (.clk, .rst_n, .start, .routine, .busy, .done,
                       .dp_start, .dp_op, .dp_dst, .dp_srca, .dp_srcb, .dp_done);
  ecc_datapath #(.N(N)) u_dp (.clk, .rst_n, .p, .start(dp_start), .op(dp_op),
                              .dst(dp_dst), .srca(dp_srca), .srcb(dp_srcb),
                              .busy(dp_busy), .done(dp_done), .phase,
                              .load, .ld_px, .ld_py, .ld_a, .ld_r2, .q_x, .q_y);

  initial begin
    repeat (1000000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic call(input routine_e rt);
    routine = rt;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    while (!done) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic pass(input fe_t pp, input fe_t x, input fe_t y, input fe_t aa);
    fe_t x2, y2, x3, y3, x4, y4, x5, y5, x6, y6, qx_mid;
    logic bad;
    bad = 1'b0;
    p = pp; ld_px = x; ld_py = y; ld_a = aa; ld_r2 = fpow2(2 * (N + 2), pp);
    padd(x, y, x, y, 1'b1, aa, pp, x2, y2, bad);      // 2P
    padd(x2, y2, x, y, 1'b0, aa, pp, x3, y3, bad);    // 3P
    padd(x3, y3, x, y, 1'b0, aa, pp, x4, y4, bad);    // 4P (discarded)
    padd(x3, y3, x3, y3, 1'b1, aa, pp, x6, y6, bad);  // 6P (discarded)
    @(negedge clk) load = 1'b1;
    @(negedge clk) load = 1'b0;
    call(RT_INIT);
    call(RT_DBL);
    call(RT_KEEP);
    call(RT_ADD);
    call(RT_KEEP);
    qx_mid = q_x;
    call(RT_DUMMY);
    checks++;
    if (q_x != qx_mid) begin failures++; $display("DUMMY changed Q"); end
    call(RT_ADD);
    // T holds 4P in the Montgomery domain; check it after conversion
    x5 = fmul(fe_t'(u_dp.u_rf.mem[R_TX]), finv(fpow2(N + 2, pp), pp), pp);
    y5 = fmul(fe_t'(u_dp.u_rf.mem[R_TY]), finv(fpow2(N + 2, pp), pp), pp);
    checks++;
    if (x5 != x4 || y5 != y4) begin failures++; $display("4P in T wrong"); end
    call(RT_DBL);                                    // T = 6P, from Q = 3P
    call(RT_DUMMY);
    call(RT_FINAL);
    checks++;
    if (bad) begin failures++; $display("reference hit an exceptional case"); end
    checks++;
    if (q_x != x3 || q_y != y3) begin
      failures++; $display("3P: got (%h, %h) expected (%h, %h)", q_x, q_y, x3, y3);
    end
    x5 = fmul(fe_t'(u_dp.u_rf.mem[R_TX]), finv(fpow2(N + 2, pp), pp), pp);
    y5 = fmul(fe_t'(u_dp.u_rf.mem[R_TY]), finv(fpow2(N + 2, pp), pp), pp);
    checks++;
    if (x5 != x6 || y5 != y6) begin failures++; $display("6P in T wrong"); end
  endtask

  initial begin
    fe_t pp, x, y, aa;
    routine = RT_INIT;
    p = P192; ld_px = '0; ld_py = '0; ld_a = '0; ld_r2 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    pass(P192, GX, GY, P192 - fe_t'(3));
    // any x, y, a define a curve through (x, y) with a suitable b
    pp = fe_t'(32'h7fffffff);
    x = frand(pp); y = frand(pp); aa = frand(pp);
    pass(pp, x, y, aa);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
