// tb_combine_across_coils_kernel: 4x3 image, 3 coils, once with halve = 0 and once with
// halve = 1. x is streamed coil after coil, then b1 pixel by pixel. Reference in double:
//   out = C * sum|b1|^2 / sum(x*b1),  C = nx*pi/nline (halved when halve = 1).
// Checks values, the 2-clock latency from each b1 beat, out_last and the LOAD/EMIT switch.
module tb_combine_across_coils_kernel;
  import xdg_pkg::*;
  import tb_fp_pkg::*;

  localparam int NPX   = 4;
  localparam int NPY   = 3;
  localparam int NC    = 3;
  localparam int NX    = 640;
  localparam int NLINE = 40;
  localparam int NPIX  = NPX * NPY;
  localparam real PI   = 3.14159265358979323846;

  logic  clk = 1'b0, rst = 1'b1;
  logic  halve = 1'b0;
  logic  x_valid = 1'b0, b1_valid = 1'b0;
  cplx_t x;
  cplx_t b1 [NC];
  logic  out_valid, out_last, loading;
  cplx_t out;

  cplx_t xs [NC][NPIX];
  int    checks = 0, failures = 0, cycle = 0, outs = 0;
  int    emit_t [$];
  typedef struct { real re, im; } exp_t;
  exp_t  q [$];

  combine_across_coils_kernel #(.NPX(NPX), .NPY(NPY), .NC(NC), .NX(NX), .NLINE(NLINE)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      exp_t e;
      e = q.pop_front();
      outs++;
      checks += 3;
      if (!close(fp_to_real(out.re), e.re, 1e-4, rabs(e.re) + rabs(e.im)) ||
          !close(fp_to_real(out.im), e.im, 1e-4, rabs(e.re) + rabs(e.im))) begin
        failures++;
        $display("out mismatch: got %g,%gi want %g,%gi", fp_to_real(out.re),
                 fp_to_real(out.im), e.re, e.im);
      end
      if (emit_t.pop_front() + 2 != cycle) failures++;
      if (out_last != (q.size() == 0)) failures++;
    end
  end

  task automatic run(bit h);
    real c;
    halve = h;
    c = real'(NX) * PI / real'(NLINE) / (h ? 2.0 : 1.0);
    checks++;
    if (!loading) failures++;
    for (int cc = 0; cc < NC; cc++)
      for (int i = 0; i < NPIX; i++) begin
        @(negedge clk);
        x_valid = 1'b1;
        x = rnd_c();
        xs[cc][i] = x;
      end
    @(negedge clk);
    x_valid = 1'b0;
    checks++;
    if (loading) failures++;
    for (int i = 0; i < NPIX; i++) begin
      real num = 0.0, dr = 0.0, di = 0.0, d2;
      exp_t e;
      if ($urandom % 3 == 0) begin
        b1_valid = 1'b0;
        @(negedge clk);
      end
      b1_valid = 1'b1;
      for (int cc = 0; cc < NC; cc++) begin
        real br, bi, xr, xi;
        b1[cc] = rnd_c();
        br = fp_to_real(b1[cc].re); bi = fp_to_real(b1[cc].im);
        xr = fp_to_real(xs[cc][i].re); xi = fp_to_real(xs[cc][i].im);
        num += br * br + bi * bi;
        dr  += xr * br - xi * bi;
        di  += xr * bi + xi * br;
      end
      d2 = dr * dr + di * di;
      e.re = c * num * dr / d2;
      e.im = -c * num * di / d2;
      q.push_back(e);
      emit_t.push_back(cycle);
      @(negedge clk);
    end
    b1_valid = 1'b0;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    x = '0;
    for (int cc = 0; cc < NC; cc++) b1[cc] = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    run(1'b0);
    run(1'b1);
    checks++;
    if (outs != 2 * NPIX) failures++;
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
