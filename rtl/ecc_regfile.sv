// ecc_regfile: working registers of the data-path and its operand multiplexer.
//
// Holds NREGS field elements of N bits: the base point, the accumulator
// point, the result of the last point operation, the curve coefficient a,
// the conversion constant R^2 mod p, the constant 1 and three scratch
// words (layout in ecc_pkg).  Two combinational read ports select the two
// operands sent to the arithmetic units, playing the part of the operand
// MUX at the top of the data-path; one synchronous write port takes results
// back.  A load strobe writes the operation's inputs (P, a, R^2 mod p, 1)
// in one clock.  The accumulator words are also brought out directly.
//
// The published design shows the operand MUX and two temporary registers (TEMP 1,
// TEMP 2) feeding it; how many words they hold is not given, so this
// register file, its size and its layout are this design's own.
//
// Timing: reads are combinational, writes and loads take effect at the
// next rising clock edge; a write has priority over nothing else since the
// controllers never issue both in one clock (load wins if they do).
module ecc_regfile
  import ecc_pkg::*;
#(
  parameter int unsigned N = 192
) (
  input  logic          clk,
  input  logic          rst_n,
  // operand read ports
  input  raddr_t        ra_a,
  input  raddr_t        ra_b,
  output logic [N-1:0]  rd_a,
  output logic [N-1:0]  rd_b,
  // result write port
  input  logic          we,
  input  raddr_t        wa,
  input  logic [N-1:0]  wd,
  // parallel load of the operation's inputs
  input  logic          load,
  input  logic [N-1:0]  ld_px,
  input  logic [N-1:0]  ld_py,
  input  logic [N-1:0]  ld_a,
  input  logic [N-1:0]  ld_r2,
  // accumulator point
  output logic [N-1:0]  q_x,
  output logic [N-1:0]  q_y
);

  logic [N-1:0] mem [NREGS];

  assign rd_a = (int'(ra_a) < NREGS) ? mem[ra_a] : '0;
  assign rd_b = (int'(ra_b) < NREGS) ? mem[ra_b] : '0;
  assign q_x  = mem[R_QX];
  assign q_y  = mem[R_QY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) mem[i] <= '0;
    end else if (load) begin
      mem[R_PX]  <= ld_px;
      mem[R_PY]  <= ld_py;
      mem[R_A]   <= ld_a;
      mem[R_R2]  <= ld_r2;
      mem[R_ONE] <= N'(1);
    end else if (we && int'(wa) < NREGS) begin
      mem[wa] <= wd;
    end
  end

endmodule
