// multiplication_kernel: weights raw k-space samples by the density compensation.
//
// out[i] = kdatau[i] * wu[i] for one respiratory phase and coil. The result is the
// input of the type 1 NUFFT that produces the initial reconstruction. kdatau is complex
// and wu real (the density compensation weights), so each lane holds two single-precision
// multipliers. PFACTOR lanes are replicated and PFACTOR samples are accepted per clock;
// the stream length must be a multiple of PFACTOR.
// Timing: fully pipelined, one beat per clock, latency 1 clock (result registered).
// in_last marks the final beat of an invocation and travels with the data.
// Interface and lane replication follow the kernel description; the single register
// stage is this implementation's choice.
module multiplication_kernel
  import xdg_pkg::*;
#(
  parameter int unsigned PFACTOR = 1
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  logic  in_last,
  input  cplx_t kdatau [PFACTOR],
  input  fp32_t wu     [PFACTOR],
  output logic  out_valid,
  output logic  out_last,
  output cplx_t out    [PFACTOR]
);
  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_last  <= in_valid & in_last;
    end
    if (in_valid)
      for (int p = 0; p < int'(PFACTOR); p++) out[p] <= c_scale(kdatau[p], wu[p]);
  end
endmodule
