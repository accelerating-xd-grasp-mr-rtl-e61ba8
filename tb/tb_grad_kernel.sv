// tb_grad_kernel: gradient for the first, a middle and the last respiratory phase of
// a 4-phase series, two lanes. Reference in double precision:
//   f(d) = d / sqrt(|d|^2 + l1smooth), v1 = f(x - xprev), v2 = f(xnext - x),
//   v = -v2 (first), v1 (last), v1 - v2 (otherwise), res = l2grad + tv_weight * v,
//   conj_mult = sum |res|^2.
// Checks res at 1 clock latency and conj_mult 2 clocks after the last beat.
module tb_grad_kernel;
  import xdg_pkg::*;
  import tb_fp_pkg::*;

  localparam int P     = 2;
  localparam int NTRES = 4;

  logic        clk = 1'b0, rst = 1'b1;
  logic  [1:0] r = '0;
  fp32_t       l1smooth, tv_weight;
  logic        in_valid = 1'b0, in_last = 1'b0;
  cplx_t       l2grad [P], x [P], xprev [P], xnext [P];
  logic        out_valid, out_last, conj_valid;
  cplx_t       res [P];
  fp32_t       conj_mult;

  typedef struct {
    real re, im, scale;
    int  t;
  } exp_t;
  exp_t q [$];

  int  checks = 0, failures = 0, cycle = 0, last_cycle = 0, dots = 0;
  real want_sum;

  grad_kernel #(.PFACTOR(P), .NTRES(NTRES)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      for (int p = 0; p < P; p++) begin
        exp_t e;
        e = q.pop_front();
        checks += 3;
        if (!close(fp_to_real(res[p].re), e.re, 1e-5, e.scale) ||
            !close(fp_to_real(res[p].im), e.im, 1e-5, e.scale)) begin
          failures++;
          $display("res mismatch r=%0d: got %g,%gi want %g,%gi", r,
                   fp_to_real(res[p].re), fp_to_real(res[p].im), e.re, e.im);
        end
        if (e.t + 1 != cycle) failures++;
      end
    end
    if (!rst && conj_valid) begin
      dots++;
      checks += 2;
      if (!close(fp_to_real(conj_mult), want_sum, 2e-5, 1e-20)) begin
        failures++;
        $display("norm mismatch: got %g want %g", fp_to_real(conj_mult), want_sum);
      end
      if (cycle != last_cycle + 2) failures++;
    end
  end

  function automatic void tvf(real dr, real di, real s, output real fr, output real fi);
    real den;
    den = $sqrt(dr * dr + di * di + s);
    fr = dr / den;
    fi = di / den;
  endfunction

  task automatic run(int phase, int beats);
    real sm, tw, acc = 0.0;
    r = 2'(phase);
    sm = fp_to_real(l1smooth);
    tw = fp_to_real(tv_weight);
    for (int k = 0; k < beats; k++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_last  = (k == beats - 1);
      for (int p = 0; p < P; p++) begin
        exp_t e;
        real v1r, v1i, v2r, v2i, vr, vi, gr, gi;
        l2grad[p] = rnd_c(); x[p] = rnd_c(); xprev[p] = rnd_c(); xnext[p] = rnd_c();
        tvf(fp_to_real(x[p].re) - fp_to_real(xprev[p].re),
            fp_to_real(x[p].im) - fp_to_real(xprev[p].im), sm, v1r, v1i);
        tvf(fp_to_real(xnext[p].re) - fp_to_real(x[p].re),
            fp_to_real(xnext[p].im) - fp_to_real(x[p].im), sm, v2r, v2i);
        if (phase == 0) begin
          vr = -v2r; vi = -v2i;
        end else if (phase == NTRES - 1) begin
          vr = v1r; vi = v1i;
        end else begin
          vr = v1r - v2r; vi = v1i - v2i;
        end
        gr = fp_to_real(l2grad[p].re);
        gi = fp_to_real(l2grad[p].im);
        e.re = gr + tw * vr;
        e.im = gi + tw * vi;
        e.scale = rabs(gr) + rabs(gi) + rabs(tw) * 4.0 + 1e-30;
        e.t = cycle;
        q.push_back(e);
        acc += e.re * e.re + e.im * e.im;
      end
      if (in_last) last_cycle = cycle;
    end
    want_sum = acc;
    @(negedge clk);
    in_valid = 1'b0;
    in_last  = 1'b0;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    for (int p = 0; p < P; p++) begin
      l2grad[p] = '0; x[p] = '0; xprev[p] = '0; xnext[p] = '0;
    end
    l1smooth  = to_fp(1e-3);
    tv_weight = to_fp(0.125);
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    run(0, 40);
    run(2, 40);
    run(3, 40);
    tv_weight = to_fp(2.0);
    run(1, 25);
    checks++;
    if (dots != 4 || q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
