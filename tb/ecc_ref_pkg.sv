// ecc_ref_pkg: reference arithmetic for the testbenches, written with the
// language's wide integer operators (*, %) so that it shares no structure
// with the hardware.  Field elements are up to 192 bits; p is any odd prime.
// Points are affine; the flag "bad" is set when an operation meets a case
// the affine formulas cannot handle (a zero denominator).
package ecc_ref_pkg;

  localparam int unsigned MW = 192;
  typedef logic [MW-1:0]   fe_t;
  typedef logic [2*MW+7:0] wide_t;

  function automatic fe_t fmul(fe_t x, fe_t y, fe_t p);
    wide_t t;
    t = (wide_t'(x) * wide_t'(y)) % wide_t'(p);
    return fe_t'(t);
  endfunction

  function automatic fe_t fadd(fe_t x, fe_t y, fe_t p);
    wide_t t;
    t = (wide_t'(x) + wide_t'(y)) % wide_t'(p);
    return fe_t'(t);
  endfunction

  function automatic fe_t fsub(fe_t x, fe_t y, fe_t p);
    wide_t t;
    t = (wide_t'(x) + wide_t'(p) - wide_t'(y)) % wide_t'(p);
    return fe_t'(t);
  endfunction

  // x^e mod p by square-and-multiply
  function automatic fe_t fpow(fe_t x, fe_t e, fe_t p);
    fe_t r;
    r = fe_t'(1);
    for (int i = MW - 1; i >= 0; i--) begin
      r = fmul(r, r, p);
      if (e[i]) r = fmul(r, x, p);
    end
    return r;
  endfunction

  // inverse by Fermat's little theorem
  function automatic fe_t finv(fe_t x, fe_t p);
    return fpow(x, p - fe_t'(2), p);
  endfunction

  // 2^e mod p
  function automatic fe_t fpow2(int unsigned e, fe_t p);
    fe_t r;
    r = fe_t'(1) % p;
    for (int unsigned i = 0; i < e; i++) r = fadd(r, r, p);
    return r;
  endfunction

  // (x3, y3) = (x1, y1) + (x2, y2), dbl selects the doubling formula
  function automatic void padd(input fe_t x1, input fe_t y1, input fe_t x2,
                               input fe_t y2, input logic dbl, input fe_t a,
                               input fe_t p, output fe_t x3, output fe_t y3,
                               inout logic bad);
    fe_t num, den, lam;
    if (dbl) begin
      num = fadd(fmul(fe_t'(3), fmul(x1, x1, p), p), a, p);
      den = fadd(y1, y1, p);
    end else begin
      num = fsub(y2, y1, p);
      den = fsub(x2, x1, p);
    end
    if (den == '0) bad = 1'b1;
    lam = fmul(num, finv(den, p), p);
    x3  = fsub(fsub(fmul(lam, lam, p), x1, p), x2, p);
    y3  = fsub(fmul(lam, fsub(x1, x3, p), p), y1, p);
  endfunction

  // k*P by plain left-to-right double-and-add from the top set bit
  function automatic void pmul(input fe_t k, input fe_t px, input fe_t py,
                               input fe_t a, input fe_t p, output fe_t qx,
                               output fe_t qy, output logic bad);
    int top;
    fe_t tx, ty;
    bad = 1'b0;
    top = -1;
    for (int i = MW - 1; i >= 0; i--) if (k[i] && top < 0) top = i;
    qx = px; qy = py;
    for (int i = top - 1; i >= 0; i--) begin
      padd(qx, qy, qx, qy, 1'b1, a, p, tx, ty, bad);
      qx = tx; qy = ty;
      // the hardware always adds, so a zero denominator there matters too
      padd(qx, qy, px, py, 1'b0, a, p, tx, ty, bad);
      if (k[i]) begin qx = tx; qy = ty; end
    end
  endfunction

  // random field element below p
  function automatic fe_t frand(fe_t p);
    fe_t r;
    for (int i = 0; i < MW / 32; i++) r[32*i +: 32] = $urandom;
    return r % p;
  endfunction

endpackage
