// tb_update_kernel: out = a*scale_a + b*scale_b with the dot product sum out*conj(a),
// two lanes, two invocations with different scales. Reference in double precision.
// Checks out at 1 clock latency, the dot product 2 clocks after the last beat, and that
// the dot product of the second call does not include the first.
module tb_update_kernel;
  import xdg_pkg::*;
  import tb_fp_pkg::*;

  localparam int P = 2;

  logic  clk = 1'b0, rst = 1'b1;
  fp32_t scale_a = '0, scale_b = '0;
  logic  in_valid = 1'b0, in_last = 1'b0;
  cplx_t a [P], b [P];
  logic  out_valid, out_last, conj_valid;
  cplx_t out [P];
  cplx_t conj_mult;

  typedef struct {
    real re, im, scale;
    int  t;
  } exp_t;
  exp_t q [$];

  int  checks = 0, failures = 0, cycle = 0, last_cycle = 0, dots = 0;
  real dot_re, dot_im, dot_scale;

  update_kernel #(.PFACTOR(P)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      for (int p = 0; p < P; p++) begin
        exp_t e;
        e = q.pop_front();
        checks += 3;
        if (!close(fp_to_real(out[p].re), e.re, 1e-5, e.scale)) failures++;
        if (!close(fp_to_real(out[p].im), e.im, 1e-5, e.scale)) failures++;
        if (e.t + 1 != cycle) failures++;
      end
    end
    if (!rst && conj_valid) begin
      dots++;
      checks += 3;
      if (!close(fp_to_real(conj_mult.re), dot_re, 1e-5, dot_scale)) begin
        failures++;
        $display("dot re: got %g want %g", fp_to_real(conj_mult.re), dot_re);
      end
      if (!close(fp_to_real(conj_mult.im), dot_im, 1e-5, dot_scale)) begin
        failures++;
        $display("dot im: got %g want %g", fp_to_real(conj_mult.im), dot_im);
      end
      if (cycle != last_cycle + 2) failures++;
    end
  end

  task automatic run(int beats, real sa, real sb);
    real dr = 0.0, di = 0.0, ds = 0.0;
    scale_a = to_fp(sa);
    scale_b = to_fp(sb);
    sa = fp_to_real(scale_a);
    sb = fp_to_real(scale_b);
    for (int k = 0; k < beats; k++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_last  = (k == beats - 1);
      for (int p = 0; p < P; p++) begin
        exp_t e;
        real ar, ai, br, bi;
        a[p] = rnd_c(); b[p] = rnd_c();
        ar = fp_to_real(a[p].re); ai = fp_to_real(a[p].im);
        br = fp_to_real(b[p].re); bi = fp_to_real(b[p].im);
        e.re = ar * sa + br * sb;
        e.im = ai * sa + bi * sb;
        e.scale = rabs(ar * sa) + rabs(ai * sa) + rabs(br * sb) + rabs(bi * sb) + 1e-30;
        e.t = cycle;
        q.push_back(e);
        // out * conj(a)
        dr += e.re * ar + e.im * ai;
        di += e.im * ar - e.re * ai;
        ds += e.scale * (rabs(ar) + rabs(ai));
      end
      if (in_last) last_cycle = cycle;
    end
    dot_re = dr; dot_im = di; dot_scale = ds;
    @(negedge clk);
    in_valid = 1'b0;
    in_last  = 1'b0;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    for (int p = 0; p < P; p++) begin
      a[p] = '0; b[p] = '0;
    end
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    run(64, 1.0, -0.375);
    run(17, 0.5, 2.25);
    checks++;
    if (dots != 2 || q.size() != 0) failures++;
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
