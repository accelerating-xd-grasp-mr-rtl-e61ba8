// tb_fp_pkg: testbench-side helpers for single-precision values.
// fp32 values are widened to the simulator's double (exact) so reference results can be
// computed with ordinary real arithmetic, independently of the RTL operators, and
// compared with a relative tolerance.
package tb_fp_pkg;
  import xdg_pkg::*;

  function automatic real fp_to_real(fp32_t a);
    logic [63:0] d;
    if (a[30:23] == 8'd0) return 0.0;
    d = {a[31], 11'(int'(a[30:23]) - 127 + 1023), a[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic fp32_t to_fp(real r);
    return real_to_fp32(r);
  endfunction

  function automatic real rabs(real r);
    return r < 0.0 ? -r : r;
  endfunction

  // |got - want| <= tol * scale, scale = max(|want|, floor)
  function automatic bit close(real got, real want, real tol, real floor_v);
    real sc;
    sc = rabs(want) > floor_v ? rabs(want) : floor_v;
    return rabs(got - want) <= tol * sc;
  endfunction

  // Relative error bound of a sequential single-precision sum of n terms
  // (n * 2^-24, plus a margin for the terms' own rounding).
  function automatic real sum_tol(int n);
    return 1e-5 + real'(n) * 6.0e-8;
  endfunction

  // random value in [-1, 1) rounded to single precision
  function automatic real rnd();
    real r;
    r = (real'($urandom % 2000001) - 1000000.0) / 1000000.0;
    return fp_to_real(to_fp(r));
  endfunction

  function automatic cplx_t rnd_c();
    cplx_t c;
    c.re = to_fp(rnd());
    c.im = to_fp(rnd());
    return c;
  endfunction
endpackage
