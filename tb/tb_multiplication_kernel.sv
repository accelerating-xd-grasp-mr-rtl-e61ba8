// tb_multiplication_kernel: random complex samples times real weights, two lanes.
// Reference: the product formed in double precision and rounded once to single
// precision, which must match the RTL bit for bit. Checks the 1-clock latency, the
// one-beat-per-clock rate (beats are sent back to back with occasional gaps) and that
// out_last follows the last beat.
module tb_multiplication_kernel;
  import xdg_pkg::*;
  import tb_fp_pkg::*;

  localparam int P     = 2;
  localparam int BEATS = 200;

  logic  clk = 1'b0, rst = 1'b1;
  logic  in_valid = 1'b0, in_last = 1'b0;
  cplx_t kdatau [P];
  fp32_t wu     [P];
  logic  out_valid, out_last;
  cplx_t out    [P];

  int checks = 0, failures = 0, cycle = 0;
  cplx_t exp_q [$];
  int    exp_t [$];
  logic  exp_l [$];

  multiplication_kernel #(.PFACTOR(P)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // checker
  always @(posedge clk) begin
    if (!rst && out_valid) begin
      for (int p = 0; p < P; p++) begin
        cplx_t e;
        e = exp_q.pop_front();
        checks++;
        if (out[p] !== e) begin
          failures++;
          $display("mismatch lane %0d: got %h want %h", p, out[p], e);
        end
      end
      checks++;
      if (exp_t.pop_front() + 1 != cycle) begin
        failures++;
        $display("latency error at cycle %0d", cycle);
      end
      checks++;
      if (exp_l.pop_front() !== out_last) failures++;
    end
  end

  initial begin
    for (int p = 0; p < P; p++) begin
      kdatau[p] = '0;
      wu[p]     = '0;
    end
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int b = 0; b < BEATS; b++) begin
      @(negedge clk);
      if ($urandom % 5 == 0) begin
        in_valid = 1'b0;
        @(negedge clk);
      end
      in_valid = 1'b1;
      in_last  = (b == BEATS - 1);
      for (int p = 0; p < P; p++) begin
        cplx_t k;
        fp32_t w;
        k = rnd_c();
        w = to_fp(rnd() * 4.0);
        kdatau[p] = k;
        wu[p]     = w;
        exp_q.push_back('{re: to_fp(fp_to_real(k.re) * fp_to_real(w)),
                          im: to_fp(fp_to_real(k.im) * fp_to_real(w))});
      end
      exp_t.push_back(cycle);
      exp_l.push_back(in_last);
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d results missing", exp_q.size());
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
