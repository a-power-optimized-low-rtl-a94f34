// tb_ecc_processor_full: three complete 192-bit scalar multiplications on
// the NIST P-192 curve with the processor at its default parameters.  Each
// Q = k*G for a random 192-bit k (top bit set) is compared with a
// wide-integer affine reference.
// The clock count and the share of clocks spent in the inverse calculation
// phase, the halving phase and the rest are printed; the processor must
// have spent clocks in all three.  The clock count must lie within 10 % of
// 652,000, the count published for the processor this design follows (it
// varies with the key and the inverse's data-dependent loop).
module tb_ecc_processor_full;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  localparam int unsigned N = 192;
  localparam fe_t P192 = 192'hfffffffffffffffffffffffffffffffeffffffffffffffff;
  localparam fe_t GX   = 192'h188da80eb03090f67cbf20eb43a18800f4ff0afd82ff1012;
  localparam fe_t GY   = 192'h07192b95ffc8da78631011ed6b24cdd573f977a11e794811;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic [N-1:0] p, a, r2, k, px, py, qx, qy;
  logic busy, done, k_zero;
  phase_e phase;
  int checks = 0, failures = 0;
  longint n_calc = 0, n_halv = 0, n_rest = 0;

  always #5 clk = ~clk;

  ecc_processor dut (.*);

  initial begin
    repeat (3000000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (phase == PH_INV_CALC) n_calc++;
    if (phase == PH_INV_HALV) n_halv++;
    if (phase == PH_REST)     n_rest++;
  end

  task automatic run(input fe_t kk);
    fe_t ex, ey;
    logic bad;
    longint cyc, tot, c0, h0, r0;
    c0 = n_calc; h0 = n_halv; r0 = n_rest;
    pmul(kk, GX, GY, P192 - fe_t'(3), P192, ex, ey, bad);
    k = kk;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (bad || k_zero || qx != ex || qy != ey) begin
      failures++; $display("k=%h: got (%h, %h) expected (%h, %h)", kk, qx, qy, ex, ey);
    end
    c0 = n_calc - c0; h0 = n_halv - h0; r0 = n_rest - r0;
    tot = c0 + h0 + r0;
    $display("k=%h: %0d clocks", kk, cyc);
    $display("  inverse calculation %0d clocks (%0d.%0d %%), halving %0d (%0d.%0d %%), rest %0d (%0d.%0d %%)",
             c0, c0 * 100 / tot, (c0 * 1000 / tot) % 10,
             h0, h0 * 100 / tot, (h0 * 1000 / tot) % 10,
             r0, r0 * 100 / tot, (r0 * 1000 / tot) % 10);
    checks++;
    if (cyc < 586800 || cyc > 717200) begin failures++; $display("clock count %0d outside 652,000 +/- 10 %%", cyc); end
    checks++;
    if (c0 == 0 || h0 == 0 || r0 == 0) begin failures++; $display("a phase never ran"); end
  endtask

  initial begin
    p = P192; a = P192 - fe_t'(3); r2 = fpow2(2 * (N + 2), P192);
    k = '0; px = GX; py = GY;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3; i++) run(frand(P192) | (fe_t'(1) << (N - 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
