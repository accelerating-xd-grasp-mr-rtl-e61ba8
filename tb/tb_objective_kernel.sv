// tb_objective_kernel: three invocations of different lengths, two lanes.
// Reference: sum of |x*wu - kdatau|^2 in double precision; the RTL sum (single
// precision) must agree within a relative 1e-5. Also checks that the result arrives
// exactly 2 clocks after the last beat and that the accumulator restarts between calls.
module tb_objective_kernel;
  import xdg_pkg::*;
  import tb_fp_pkg::*;

  localparam int P = 2;

  logic  clk = 1'b0, rst = 1'b1;
  logic  in_valid = 1'b0, in_last = 1'b0;
  cplx_t x [P], kdatau [P];
  fp32_t wu [P];
  logic  out_valid;
  fp32_t out;

  int  checks = 0, failures = 0, cycle = 0, last_cycle = 0, results = 0;
  real want;

  objective_kernel #(.PFACTOR(P)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      results++;
      checks += 2;
      if (!close(fp_to_real(out), want, 1e-5, 1e-20)) begin
        failures++;
        $display("sum mismatch: got %g want %g", fp_to_real(out), want);
      end
      if (cycle != last_cycle + 2) begin
        failures++;
        $display("latency: result at %0d, last beat at %0d", cycle, last_cycle);
      end
    end
  end

  task automatic run(int beats);
    real acc = 0.0;
    for (int b = 0; b < beats; b++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_last  = (b == beats - 1);
      for (int p = 0; p < P; p++) begin
        real zr, zi;
        x[p]      = rnd_c();
        kdatau[p] = rnd_c();
        wu[p]     = to_fp(rnd() * 2.0);
        zr = fp_to_real(x[p].re) * fp_to_real(wu[p]) - fp_to_real(kdatau[p].re);
        zi = fp_to_real(x[p].im) * fp_to_real(wu[p]) - fp_to_real(kdatau[p].im);
        acc += zr * zr + zi * zi;
      end
      if (in_last) last_cycle = cycle;
    end
    want = acc;
    @(negedge clk);
    in_valid = 1'b0;
    in_last  = 1'b0;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    for (int p = 0; p < P; p++) begin
      x[p] = '0; kdatau[p] = '0; wu[p] = '0;
    end
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    run(50);
    run(1);
    run(333);
    checks++;
    if (results != 3) begin
      failures++;
      $display("expected 3 results, saw %0d", results);
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
