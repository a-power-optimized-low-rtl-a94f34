// tb_ecc_regfile: checks the working register file: random writes read back
// on both ports, the parallel load of P, a, R^2 mod p and the constant 1,
// and the direct accumulator outputs, against a shadow copy kept here.
module tb_ecc_regfile;
  import ecc_pkg::*;

  localparam int unsigned N = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  raddr_t ra_a, ra_b, wa;
  logic [N-1:0] rd_a, rd_b, wd, ld_px, ld_py, ld_a, ld_r2, q_x, q_y;
  logic we = 1'b0, load = 1'b0;
  logic [N-1:0] shadow [NREGS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ecc_regfile #(.N(N)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int i = 0; i < NREGS; i++) begin
      ra_a = raddr_t'(i); ra_b = raddr_t'(NREGS - 1 - i);
      #1;
      checks++;
      if (rd_a != shadow[i] || rd_b != shadow[NREGS - 1 - i]) begin
        failures++; $display("read mismatch at %0d", i);
      end
    end
    checks++;
    if (q_x != shadow[R_QX] || q_y != shadow[R_QY]) begin failures++; $display("accumulator ports wrong"); end
  endtask

  initial begin
    ra_a = '0; ra_b = '0; wa = '0; wd = '0;
    ld_px = '0; ld_py = '0; ld_a = '0; ld_r2 = '0;
    for (int i = 0; i < NREGS; i++) shadow[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check_all();
    for (int t = 0; t < 20; t++) begin
      for (int i = 0; i < 30; i++) begin
        @(negedge clk);
        we = 1'b1;
        wa = raddr_t'($urandom_range(NREGS - 1));
        wd = {$urandom, $urandom};
        shadow[wa] = wd;
      end
      @(negedge clk) we = 1'b0;
      check_all();
      @(negedge clk);
      load = 1'b1;
      ld_px = {$urandom, $urandom}; ld_py = {$urandom, $urandom};
      ld_a  = {$urandom, $urandom}; ld_r2 = {$urandom, $urandom};
      shadow[R_PX] = ld_px; shadow[R_PY] = ld_py; shadow[R_A] = ld_a;
      shadow[R_R2] = ld_r2; shadow[R_ONE] = N'(1);
      @(negedge clk) load = 1'b0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
