// update_kernel: scaled vector sum with a dot product on the side.
//
// out[i]      = a[i] * scale_a + b[i] * scale_b
// conj_mult   = sum_i out[i] * conj(a[i])        (complex)
// Its main use is applying the gradient to the reconstruction with the step size found
// by the line search, but it serves any "axpby" of the conjugate gradient method. The
// dot product is computed in the same pass so the data is streamed only once.
// a and b are complex, the two scales real single-precision scalars that must be held
// stable for an invocation. PFACTOR lanes accept PFACTOR elements per clock.
// Timing: out/out_valid 1 clock after the input beat; conj_mult/conj_valid 2 clocks
// after the beat flagged in_last, after which the accumulator restarts at zero.
// Real scales and a complex dot product are this implementation's reading of the
// kernel; the register stages are its own choice.
module update_kernel
  import xdg_pkg::*;
#(
  parameter int unsigned PFACTOR = 1
) (
  input  logic  clk,
  input  logic  rst,
  input  fp32_t scale_a,
  input  fp32_t scale_b,
  input  logic  in_valid,
  input  logic  in_last,
  input  cplx_t a   [PFACTOR],
  input  cplx_t b   [PFACTOR],
  output logic  out_valid,
  output logic  out_last,
  output cplx_t out [PFACTOR],
  output logic  conj_valid,
  output cplx_t conj_mult
);
  cplx_t a_r [PFACTOR];
  cplx_t lane_sum, acc;

  always_comb begin
    lane_sum = '{re: FP_ZERO, im: FP_ZERO};
    for (int p = 0; p < int'(PFACTOR); p++)
      lane_sum = c_add(lane_sum, c_mul(out[p], c_conj(a_r[p])));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid  <= 1'b0;
      out_last   <= 1'b0;
      conj_valid <= 1'b0;
      conj_mult  <= '{re: FP_ZERO, im: FP_ZERO};
      acc        <= '{re: FP_ZERO, im: FP_ZERO};
    end else begin
      out_valid  <= in_valid;
      out_last   <= in_valid & in_last;
      conj_valid <= out_valid & out_last;
      if (out_valid) begin
        if (out_last) begin
          conj_mult <= c_add(acc, lane_sum);
          acc       <= '{re: FP_ZERO, im: FP_ZERO};
        end else begin
          acc <= c_add(acc, lane_sum);
        end
      end
    end
    if (in_valid)
      for (int p = 0; p < int'(PFACTOR); p++) begin
        out[p] <= c_add(c_scale(a[p], scale_a), c_scale(b[p], scale_b));
        a_r[p] <= a[p];
      end
  end
endmodule
