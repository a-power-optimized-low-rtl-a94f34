// tb_addsub_mod: checks the single-adder adder/subtractor at N = 192 (P-192
// prime).  Plain additions and subtractions on random N+2-bit operands are
// compared with the language's own arithmetic (result and carry), and must
// finish in one clock; modular additions and subtractions of random
// operands below p, and reductions of values in [0, 2p), are compared with
// a % p reference and must finish in two clocks.
module tb_addsub_mod;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  localparam int unsigned N = 192;
  localparam int unsigned W = N + 2;
  localparam fe_t P192 = 192'hfffffffffffffffffffffffffffffffeffffffffffffffff;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  as_op_e op;
  logic [W-1:0] a, b, res;
  logic [N-1:0] p;
  logic carry, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  addsub_mod #(.N(N), .W(W)) dut (.clk, .rst_n, .start, .op, .a, .b, .p, .res, .carry, .done);

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] wrand();
    logic [W-1:0] r;
    for (int i = 0; i < 7; i++) r[32*i +: 32] = $urandom;   // W <= 224
    return r;
  endfunction

  task automatic run(input as_op_e o, input logic [W-1:0] x, input logic [W-1:0] y,
                     input logic [W-1:0] exp_res, input logic exp_carry, input logic chk_carry);
    int cyc;
    op = o; a = x; b = y;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    a = wrand(); b = wrand();          // operands are sampled at start only
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != ((o == AS_MADD || o == AS_MSUB) ? 1 : 0)) begin
      failures++; $display("op %s latency %0d", o.name(), cyc);
    end
    checks++;
    if (res != exp_res || (chk_carry && carry != exp_carry)) begin
      failures++;
      $display("op %s a=%h b=%h got %h/%b expected %h/%b", o.name(), x, y, res, carry, exp_res, exp_carry);
    end
  endtask

  initial begin
    logic [W:0] s;
    fe_t x, y;
    p = P192; op = AS_ADD; a = '0; b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      logic [W-1:0] u, v;
      u = wrand(); v = wrand();
      s = {1'b0, u} + {1'b0, v};
      run(AS_ADD, u, v, s[W-1:0], s[W], 1'b1);
      run(AS_SUB, u, v, u - v, u >= v, 1'b1);
    end
    for (int i = 0; i < 300; i++) begin
      x = frand(P192); y = frand(P192);
      if (i == 0) begin x = P192 - 1; y = P192 - 1; end
      if (i == 1) begin x = '0; y = P192 - 1; end
      run(AS_MADD, W'(x), W'(y), W'(fadd(x, y, P192)), 1'b0, 1'b0);
      run(AS_MSUB, W'(x), W'(y), W'(fsub(x, y, P192)), 1'b0, 1'b0);
      // reduction of a value in [0, 2p)
      run(AS_MADD, W'(x) + W'(P192), '0, W'(x), 1'b0, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
