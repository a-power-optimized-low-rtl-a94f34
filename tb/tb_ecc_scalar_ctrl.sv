// tb_ecc_scalar_ctrl: checks the double-and-always-add controller against a
// stand-in for the point controller that records every routine it is asked
// for and answers after a random delay.  For random keys (and k = 0, k = 1,
// all ones) the recorded routine list must equal the list derived here from
// the key bits, a point addition must be run for every bit below the top
// one whatever its value, and the load strobe must come exactly once.
module tb_ecc_scalar_ctrl;
  import ecc_pkg::*;

  localparam int unsigned N = 24;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic [N-1:0] k;
  logic busy, done, k_zero, dp_load, pc_start, pc_done;
  routine_e pc_routine;
  routine_e got [$];
  int loads;
  int checks = 0, failures = 0;
  int n_keep_bits = 0, n_dummy_bits = 0;

  always #5 clk = ~clk;

  ecc_scalar_ctrl #(.N(N)) dut (.*);

  // stand-in point controller
  int pc_cnt = 0;
  initial pc_done = 1'b0;
  always @(posedge clk) begin
    pc_done <= 1'b0;
    if (pc_start) begin
      got.push_back(pc_routine);
      pc_cnt <= 1 + int'($urandom_range(4));
    end else if (pc_cnt > 0) begin
      pc_cnt <= pc_cnt - 1;
      if (pc_cnt == 1) pc_done <= 1'b1;
    end
  end

  always @(posedge clk) if (dp_load) loads++;

  initial begin
    repeat (500000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [N-1:0] kk);
    routine_e expq [$];
    int top;
    got.delete();
    loads = 0;
    top = -1;
    for (int i = N - 1; i >= 0; i--) if (kk[i] && top < 0) top = i;
    if (top >= 0) begin
      expq.push_back(RT_INIT);
      for (int i = top - 1; i >= 0; i--) begin
        expq.push_back(RT_DBL);
        expq.push_back(RT_KEEP);
        expq.push_back(RT_ADD);
        expq.push_back(kk[i] ? RT_KEEP : RT_DUMMY);
        if (kk[i]) n_keep_bits++; else n_dummy_bits++;
      end
      expq.push_back(RT_FINAL);
    end
    k = kk;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    k = '0;
    while (!done) @(negedge clk);
    checks++;
    if (got != expq) begin
      failures++; $display("k=%h: %0d routines, expected %0d", kk, got.size(), expq.size());
    end
    checks++;
    if (k_zero != (kk == '0)) begin failures++; $display("k_zero wrong for %h", kk); end
    checks++;
    if (loads != 1) begin failures++; $display("load strobes %0d", loads); end
  endtask

  initial begin
    k = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run('0);
    run(N'(1));
    run('1);
    for (int i = 0; i < 40; i++) run(N'($urandom));
    checks++;
    if (n_keep_bits == 0 || n_dummy_bits == 0) begin failures++; $display("a bit value was never used"); end
    $display("key bits: %0d ones, %0d zeros", n_keep_bits, n_dummy_bits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
