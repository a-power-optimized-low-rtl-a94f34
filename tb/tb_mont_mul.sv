// tb_mont_mul: checks the bit-serial Montgomery multiplier at N = 192 with
// the NIST P-192 prime and at N = 31 with 2^31 - 1.  For random operands
// below p it checks that m < 2p, that m * 2^(N+2) = a * b (mod p), and that
// done arrives exactly N+2 clocks after start.
module tb_mont_mul;
  import ecc_ref_pkg::*;

  localparam int unsigned N = 192;
  localparam fe_t P192 = 192'hfffffffffffffffffffffffffffffffeffffffffffffffff;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic [N-1:0] a, b, p;
  logic [N:0] m;
  logic busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mont_mul #(.N(N)) dut (.clk, .rst_n, .start, .a, .b, .p, .m, .busy, .done);

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input fe_t x, input fe_t y, input fe_t pp);
    int cyc;
    fe_t lhs, rhs;
    a = x; b = y; p = pp;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != N + 2) begin failures++; $display("latency %0d, expected %0d", cyc, N + 2); end
    checks++;
    if ({1'b0, m} >= {1'b0, pp, 1'b0}) begin failures++; $display("m not below 2p"); end
    lhs = fmul(fe_t'(m % {1'b0, pp}), fpow2(N + 2, pp), pp);
    rhs = fmul(x, y, pp);
    checks++;
    if (lhs != rhs) begin
      failures++;
      $display("mismatch a=%h b=%h m=%h", x, y, m);
    end
  endtask

  initial begin
    a = '0; b = '0; p = P192;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run('0, '0, P192);
    run(P192 - 1, P192 - 1, P192);
    run(fe_t'(1), P192 - 1, P192);
    for (int i = 0; i < 150; i++) run(frand(P192), frand(P192), P192);
    // a small prime in the wide unit
    for (int i = 0; i < 50; i++) run(frand(fe_t'(32'h7fffffff)), frand(fe_t'(32'h7fffffff)), fe_t'(32'h7fffffff));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
