// objective_kernel: data-consistency cost of one respiratory phase and coil.
//
// out = sum_i z[i] * conj(z[i]),  z[i] = x[i] * wu[i] - kdatau[i]
// where x is the type 2 NUFFT output, kdatau the measured k-space data and wu the real
// density compensation weight. It is the last step of the objective function evaluated
// by the backtracking line search. Each of the PFACTOR lanes forms |z|^2; the lane
// results are added and accumulated into one single-precision running sum.
// Timing: one beat of PFACTOR samples per clock. The sum appears on out with out_valid
// two clocks after the beat flagged in_last; the accumulator then restarts at zero for
// the next invocation. The accumulation order (lanes first, then beats) is this
// implementation's choice, so the result can differ from a sequential sum in the last
// bits.
module objective_kernel
  import xdg_pkg::*;
#(
  parameter int unsigned PFACTOR = 1
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  logic  in_last,
  input  cplx_t x      [PFACTOR],
  input  cplx_t kdatau [PFACTOR],
  input  fp32_t wu     [PFACTOR],
  output logic  out_valid,
  output fp32_t out
);
  logic  s1_valid, s1_last;
  fp32_t s1_sum, acc, lane_sum;

  always_comb begin
    lane_sum = FP_ZERO;
    for (int p = 0; p < int'(PFACTOR); p++)
      lane_sum = fp_add(lane_sum, c_abs2(c_sub(c_scale(x[p], wu[p]), kdatau[p])));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_valid  <= 1'b0;
      s1_last   <= 1'b0;
      acc       <= FP_ZERO;
      out_valid <= 1'b0;
      out       <= FP_ZERO;
    end else begin
      s1_valid  <= in_valid;
      s1_last   <= in_valid & in_last;
      out_valid <= s1_valid & s1_last;
      if (s1_valid) begin
        if (s1_last) begin
          out <= fp_add(acc, s1_sum);
          acc <= FP_ZERO;
        end else begin
          acc <= fp_add(acc, s1_sum);
        end
      end
    end
    if (in_valid) s1_sum <= lane_sum;
  end
endmodule
