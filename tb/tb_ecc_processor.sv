// tb_ecc_processor: end-to-end test of the processor at N = 64 with the
// prime p = 2^61 - 1, and with the 16-bit prime 65521 on the same hardware.  For random curves through random points (b follows
// from x, y and a and is never needed) and random keys it runs complete
// scalar multiplications and compares Q with a wide-integer affine
// reference.  k = 0 must raise k_zero.  It counts how often each mechanism
// of the design was exercised and fails if one never was:
//   key bit 1 (Q = T) and key bit 0 (dummy move) of double-and-always-add,
//   clocks in the inverse calculation phase and in the halving phase,
//   halving steps (k > N+2) and doubling steps (k < N+2) in that phase,
//   modular additions whose result needed the second (-p) adder step,
//   modular subtractions that borrowed and had p added back,
//   the k = 0 report.
module tb_ecc_processor;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  localparam int unsigned N = 64;
  localparam fe_t PRIME = fe_t'(64'h1fffffffffffffff);
  localparam fe_t SHORT = fe_t'(65521);

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic [N-1:0] p, a, r2, k, px, py, qx, qy;
  logic busy, done, k_zero;
  phase_e phase;
  int checks = 0, failures = 0;
  int n_bit1 = 0, n_bit0 = 0, n_calc = 0, n_halv = 0, n_addfix = 0, n_subfix = 0, n_kzero = 0,
      n_hstep = 0, n_dstep = 0;

  always #5 clk = ~clk;

  ecc_processor #(.N(N)) dut (.*);

  initial begin
    repeat (5000000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  always @(posedge clk) begin
    if (phase == PH_INV_CALC) n_calc++;
    if (phase == PH_INV_HALV) n_halv++;
    if (phase == PH_INV_HALV && dut.u_dp.u_inv.k > N + 2) n_hstep++;
    if (phase == PH_INV_HALV && dut.u_dp.u_inv.k < N + 2) n_dstep++;
    if (dut.pc_start && dut.u_scalar.step == 3'd4) begin   // ST_SEL
      if (dut.pc_routine == RT_KEEP) n_bit1++;
      if (dut.pc_routine == RT_DUMMY) n_bit0++;
    end
    if (dut.u_dp.u_as.step2 && dut.u_dp.u_as.madd && dut.u_dp.u_as.add_s[N+2]) n_addfix++;
    if (dut.u_dp.u_as.step2 && !dut.u_dp.u_as.madd && !dut.u_dp.u_as.carry) n_subfix++;
  end

  task automatic run(input fe_t kk, input fe_t x, input fe_t y, input fe_t aa,
                   input fe_t pp = PRIME);
    fe_t ex, ey;
    logic bad;
    int cyc;
    pmul(kk, x, y, aa, pp, ex, ey, bad);
    if (bad && kk != '0) return;     // affine exceptional case: not supported
    p = pp; a = aa; r2 = fpow2(2 * (N + 2), pp); k = kk; px = x; py = y;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    k = '0; px = '0;                  // inputs are captured at start
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (kk == '0) begin
      if (!k_zero) begin failures++; $display("k = 0 not reported"); end
      else n_kzero++;
    end else if (k_zero || qx != ex || qy != ey) begin
      failures++; $display("k=%h: got (%h, %h) expected (%h, %h)", kk, qx, qy, ex, ey);
    end
    $display("k=%h  %0d clocks", kk, cyc);
  endtask

  initial begin
    p = '0; a = '0; r2 = '0; k = '0; px = '0; py = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(fe_t'(0), frand(PRIME), frand(PRIME), frand(PRIME));
    run(fe_t'(1), frand(PRIME), frand(PRIME), frand(PRIME));
    run(fe_t'(2), frand(PRIME), frand(PRIME), frand(PRIME));
    for (int i = 0; i < 6; i++)
      run(fe_t'({$urandom, $urandom}), frand(PRIME), frand(PRIME), frand(PRIME));
    // a 16-bit prime on the 64-bit hardware: the inverse doubles instead
    for (int i = 0; i < 3; i++)
      run(fe_t'($urandom_range(65535, 2)), frand(SHORT), frand(SHORT), frand(SHORT), SHORT);
    $display("mechanisms: key bit 1 %0d, key bit 0 %0d, inverse calculation clocks %0d, halving clocks %0d (halving %0d, doubling %0d), add -p %0d, sub +p %0d, k=0 %0d",
             n_bit1, n_bit0, n_calc, n_halv, n_hstep, n_dstep, n_addfix, n_subfix, n_kzero);
    if (n_hstep == 0)  begin failures++; $display("no halving step"); end
    if (n_dstep == 0)  begin failures++; $display("no doubling step"); end
    if (n_bit1 == 0)   begin failures++; $display("no key bit 1"); end
    if (n_bit0 == 0)   begin failures++; $display("no key bit 0"); end
    if (n_calc == 0)   begin failures++; $display("no inverse calculation"); end
    if (n_halv == 0)   begin failures++; $display("no halving"); end
    if (n_addfix == 0) begin failures++; $display("no add correction"); end
    if (n_subfix == 0) begin failures++; $display("no sub correction"); end
    if (n_kzero == 0)  begin failures++; $display("no k = 0"); end
    checks += 9;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
