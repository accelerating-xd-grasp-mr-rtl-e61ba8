// tb_transposed_multiplication_kernel: 6x4 images, two lanes, 4 phases.
// Each invocation loads x and xnext row-major, then streams b1 and expects
// out[o] = x[row][col] * b1[o] with o = col*NPY + row (column-major order of x).
// Reference TV: sum sqrt(|xnext - x|^2 + l1smooth), with v = 0 for the last phase.
// Checks values, the 2-clock latencies of tv_out and out, out_last and the switch
// between the LOAD and EMIT phases.
module tb_transposed_multiplication_kernel;
  import xdg_pkg::*;
  import tb_fp_pkg::*;

  localparam int P     = 2;
  localparam int NPX   = 6;
  localparam int NPY   = 4;
  localparam int NTRES = 4;
  localparam int NPIX  = NPX * NPY;

  logic        clk = 1'b0, rst = 1'b1;
  logic  [1:0] r = '0;
  fp32_t       l1smooth;
  logic        x_valid = 1'b0, b1_valid = 1'b0;
  cplx_t       x [P], xnext [P], b1 [P];
  logic        tv_valid, out_valid, out_last, loading;
  fp32_t       tv_out;
  cplx_t       out [P];

  cplx_t img [NPIX];
  int    checks = 0, failures = 0, cycle = 0, tv_seen = 0, outs = 0;
  int    last_load, emit_t [$];
  real   want_tv;
  typedef struct { real re, im, scale; } exp_t;
  exp_t  q [$];

  transposed_multiplication_kernel #(.PFACTOR(P), .NPX(NPX), .NPY(NPY), .NTRES(NTRES)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (!rst && tv_valid) begin
      tv_seen++;
      checks += 2;
      if (!close(fp_to_real(tv_out), want_tv, 1e-5, 1e-20)) begin
        failures++;
        $display("tv mismatch: got %g want %g", fp_to_real(tv_out), want_tv);
      end
      if (cycle != last_load + 2) failures++;
    end
    if (!rst && out_valid) begin
      checks += 2;
      if (emit_t.pop_front() + 2 != cycle) failures++;
      if (out_last != (q.size() == P)) failures++;
      for (int p = 0; p < P; p++) begin
        exp_t e;
        e = q.pop_front();
        outs++;
        checks++;
        if (!close(fp_to_real(out[p].re), e.re, 1e-5, e.scale) ||
            !close(fp_to_real(out[p].im), e.im, 1e-5, e.scale)) begin
          failures++;
          $display("out mismatch: got %g,%gi want %g,%gi", fp_to_real(out[p].re),
                   fp_to_real(out[p].im), e.re, e.im);
        end
      end
    end
  end

  task automatic run(int phase);
    real tv = 0.0, sm;
    r  = 2'(phase);
    sm = fp_to_real(l1smooth);
    checks++;
    if (!loading) failures++;
    for (int k = 0; k < NPIX / P; k++) begin
      @(negedge clk);
      x_valid = 1'b1;
      for (int p = 0; p < P; p++) begin
        real dr, di;
        x[p] = rnd_c(); xnext[p] = rnd_c();
        img[k * P + p] = x[p];
        dr = (phase == NTRES - 1) ? 0.0 : fp_to_real(xnext[p].re) - fp_to_real(x[p].re);
        di = (phase == NTRES - 1) ? 0.0 : fp_to_real(xnext[p].im) - fp_to_real(x[p].im);
        tv += $sqrt(dr * dr + di * di + sm);
      end
      if (k == NPIX / P - 1) last_load = cycle;
    end
    want_tv = tv;
    @(negedge clk);
    x_valid = 1'b0;
    checks++;
    if (loading) failures++;
    repeat (2) @(negedge clk);
    for (int k = 0; k < NPIX / P; k++) begin
      if ($urandom % 3 == 0) begin
        b1_valid = 1'b0;
        @(negedge clk);
      end
      b1_valid = 1'b1;
      for (int p = 0; p < P; p++) begin
        int o, col, row;
        exp_t e;
        real ar, ai, br, bi;
        o   = k * P + p;
        col = o / NPY;
        row = o % NPY;
        b1[p] = rnd_c();
        ar = fp_to_real(img[row * NPX + col].re); ai = fp_to_real(img[row * NPX + col].im);
        br = fp_to_real(b1[p].re); bi = fp_to_real(b1[p].im);
        e.re = ar * br - ai * bi;
        e.im = ar * bi + ai * br;
        e.scale = (rabs(ar) + rabs(ai)) * (rabs(br) + rabs(bi)) + 1e-30;
        q.push_back(e);
      end
      emit_t.push_back(cycle);
      @(negedge clk);
    end
    b1_valid = 1'b0;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    for (int p = 0; p < P; p++) begin
      x[p] = '0; xnext[p] = '0; b1[p] = '0;
    end
    l1smooth = to_fp(1e-2);
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    run(1);
    run(3);
    run(0);
    checks++;
    if (tv_seen != 3 || outs != 3 * NPIX || q.size() != 0) begin
      failures++;
      $display("tv results %0d, outputs %0d", tv_seen, outs);
    end
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
