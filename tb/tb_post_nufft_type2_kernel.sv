// tb_post_nufft_type2_kernel: random residuals (x*wu - kdatau)*wu on two lanes.
// Reference in double precision; each component must agree within 1e-5 of the size of
// its terms. Checks the 2-clock latency at full rate and the out_last flag.
module tb_post_nufft_type2_kernel;
  import xdg_pkg::*;
  import tb_fp_pkg::*;

  localparam int P     = 2;
  localparam int BEATS = 300;

  logic  clk = 1'b0, rst = 1'b1;
  logic  in_valid = 1'b0, in_last = 1'b0;
  cplx_t x [P], kdatau [P];
  fp32_t wu [P];
  logic  out_valid, out_last;
  cplx_t out [P];

  typedef struct {
    real re, im, scale;
    int  t;
    bit  last;
  } exp_t;
  exp_t q [$];

  int checks = 0, failures = 0, cycle = 0;

  post_nufft_type2_kernel #(.PFACTOR(P)) dut (.*);

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
        if (e.t + 2 != cycle || e.last != out_last) begin
          failures++;
          $display("timing/last error at cycle %0d", cycle);
        end
      end
    end
  end

  initial begin
    for (int p = 0; p < P; p++) begin
      x[p] = '0; kdatau[p] = '0; wu[p] = '0;
    end
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int b = 0; b < BEATS; b++) begin
      @(negedge clk);
      in_valid = ($urandom % 4 != 0) || b == BEATS - 1;
      in_last  = (b == BEATS - 1);
      for (int p = 0; p < P; p++) begin
        exp_t e;
        real xr, xi, kr, ki, w;
        x[p] = rnd_c(); kdatau[p] = rnd_c(); wu[p] = to_fp(rnd() * 3.0);
        xr = fp_to_real(x[p].re); xi = fp_to_real(x[p].im);
        kr = fp_to_real(kdatau[p].re); ki = fp_to_real(kdatau[p].im);
        w  = fp_to_real(wu[p]);
        e.re = (xr * w - kr) * w;
        e.im = (xi * w - ki) * w;
        e.scale = (rabs(xr * w) + rabs(xi * w) + rabs(kr) + rabs(ki)) * rabs(w) + 1e-30;
        e.t = cycle;
        e.last = in_last;
        if (in_valid) q.push_back(e);
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("%0d results missing", q.size());
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
