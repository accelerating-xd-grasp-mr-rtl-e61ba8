// post_nufft_type2_kernel: k-space residual of the gradient computation.
//
// out[i] = (x[i] * wu[i] - kdatau[i]) * wu[i] for one respiratory phase and coil, where
// x is the type 2 NUFFT output, kdatau the measured data and wu the (real) density
// compensation weight. Four single-precision multipliers and two adders per lane;
// PFACTOR lanes accept PFACTOR samples per clock.
// Timing: fully pipelined, one beat per clock, latency 2 clocks: the residual
// x*wu - kdatau is registered, then weighted again and registered. in_last travels
// with the data. The arithmetic is the kernel's definition; the two-stage split is a
// choice of this implementation.
module post_nufft_type2_kernel
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
  output logic  out_last,
  output cplx_t out    [PFACTOR]
);
  logic  s1_valid, s1_last;
  cplx_t s1_z [PFACTOR];
  fp32_t s1_w [PFACTOR];

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_valid  <= 1'b0;
      s1_last   <= 1'b0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      s1_valid  <= in_valid;
      s1_last   <= in_valid & in_last;
      out_valid <= s1_valid;
      out_last  <= s1_last;
    end
    if (in_valid)
      for (int p = 0; p < int'(PFACTOR); p++) begin
        s1_z[p] <= c_sub(c_scale(x[p], wu[p]), kdatau[p]);
        s1_w[p] <= wu[p];
      end
    if (s1_valid)
      for (int p = 0; p < int'(PFACTOR); p++) out[p] <= c_scale(s1_z[p], s1_w[p]);
  end
endmodule
