// grad_kernel: final step of the gradient for one respiratory phase.
//
// res[i] = l2grad[i] + tv_weight * v[i]
//   v = -v2        for the first phase (r == 0)
//   v =  v1        for the last phase  (r == NTRES-1)
//   v =  v1 - v2   otherwise
//   v1 = f(x - xprev), v2 = f(xnext - x), f(d) = d / sqrt(d * conj(d) + l1smooth)
// conj_mult = sum_i res[i] * conj(res[i])   (a real number: the squared norm of res)
// l2grad is the coil-combined data-consistency gradient, x the current reconstruction
// and xprev/xnext those of the neighbouring respiratory phases; the term in tv_weight is
// the gradient of the temporal total variation. Boundary phases ignore the missing
// neighbour, so whatever is streamed on that input is unused.
// Interface: PFACTOR lanes, PFACTOR elements per clock; r, l1smooth and tv_weight are
// held stable for an invocation.
// Timing: res/out_valid 1 clock after the input beat; conj_mult/conj_valid 2 clocks after
// the beat flagged in_last. Phase numbering from 0 and the placement of l1smooth inside
// the square root are this implementation's reading; the registers are its own choice.
module grad_kernel
  import xdg_pkg::*;
#(
  parameter int unsigned PFACTOR = 1,
  parameter int unsigned NTRES   = NTRES_DEFAULT
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [$clog2(NTRES)-1:0] r,
  input  fp32_t                    l1smooth,
  input  fp32_t                    tv_weight,
  input  logic                     in_valid,
  input  logic                     in_last,
  input  cplx_t                    l2grad [PFACTOR],
  input  cplx_t                    x      [PFACTOR],
  input  cplx_t                    xprev  [PFACTOR],
  input  cplx_t                    xnext  [PFACTOR],
  output logic                     out_valid,
  output logic                     out_last,
  output cplx_t                    res    [PFACTOR],
  output logic                     conj_valid,
  output fp32_t                    conj_mult
);
  typedef enum logic [1:0] {PH_FIRST, PH_LAST, PH_MIDDLE} phase_e;

  phase_e phase;
  cplx_t  res_c [PFACTOR];
  fp32_t  lane_sum, acc;

  function automatic cplx_t tv_f(cplx_t d, fp32_t smooth);
    fp32_t den;
    den = fp_sqrt(fp_add(c_abs2(d), smooth));
    return '{re: fp_div(d.re, den), im: fp_div(d.im, den)};
  endfunction

  always_comb begin
    if (r == '0)                              phase = PH_FIRST;
    else if (int'(r) == int'(NTRES) - 1)      phase = PH_LAST;
    else                                      phase = PH_MIDDLE;
    for (int p = 0; p < int'(PFACTOR); p++) begin
      cplx_t v1, v2, v;
      v1 = tv_f(c_sub(x[p], xprev[p]), l1smooth);
      v2 = tv_f(c_sub(xnext[p], x[p]), l1smooth);
      unique case (phase)
        PH_FIRST: v = '{re: fp_neg(v2.re), im: fp_neg(v2.im)};
        PH_LAST:  v = v1;
        default:  v = c_sub(v1, v2);
      endcase
      res_c[p] = c_add(l2grad[p], c_scale(v, tv_weight));
    end
    lane_sum = FP_ZERO;
    for (int p = 0; p < int'(PFACTOR); p++) lane_sum = fp_add(lane_sum, c_abs2(res[p]));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid  <= 1'b0;
      out_last   <= 1'b0;
      conj_valid <= 1'b0;
      conj_mult  <= FP_ZERO;
      acc        <= FP_ZERO;
    end else begin
      out_valid  <= in_valid;
      out_last   <= in_valid & in_last;
      conj_valid <= out_valid & out_last;
      if (out_valid) begin
        if (out_last) begin
          conj_mult <= fp_add(acc, lane_sum);
          acc       <= FP_ZERO;
        end else begin
          acc <= fp_add(acc, lane_sum);
        end
      end
    end
    if (in_valid) res <= res_c;
  end
endmodule
