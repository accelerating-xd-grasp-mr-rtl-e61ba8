// combine_across_coils_kernel: merges the per-coil type 1 NUFFT images of one
// respiratory phase into one image.
//
// out[i] = C * (sum_c |b1[i][c]|^2) / (sum_c tmp[i][c] * b1[i][c]),  tmp = x^T
// C = nx*pi/(2*nline) when halve is set, nx*pi/nline otherwise.
// The NUFFT delivers x coil after coil (coil-major), while the combination needs all
// coils of one pixel at once, so the kernel transposes x on chip into NC separate
// memories, one per coil, which are then read in parallel.
//  LOAD  NC*NPX*NPY beats of x, one complex value per clock, coil-major. Beat k of coil
//        c is written to memory c at pixel k.
//  EMIT  NPX*NPY beats of b1, each holding the NC coil sensitivities of one pixel.
//        All NC memories are read at that pixel and the result appears on out two
//        clocks later; out_last flags the last pixel. The kernel then returns to LOAD.
// The complex quotient is formed as k * conj(den) with k = C*num/|den|^2, so one divider
// serves both components. halve must be held stable during EMIT.
// The equation, the NC-memory transpose and the absence of lane replication follow the
// kernel description; the two-phase protocol and the constants nx and nline are this
// design's choices.
module combine_across_coils_kernel
  import xdg_pkg::*;
#(
  parameter int unsigned NPX   = NPX_DEFAULT,
  parameter int unsigned NPY   = NPY_DEFAULT,
  parameter int unsigned NC    = NC_DEFAULT,
  parameter int unsigned NX    = NX_DEFAULT,
  parameter int unsigned NLINE = NLINE_DEFAULT
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  halve,
  // LOAD stream
  input  logic  x_valid,
  input  cplx_t x,
  // EMIT stream
  input  logic  b1_valid,
  input  cplx_t b1 [NC],
  output logic  out_valid,
  output logic  out_last,
  output cplx_t out,
  // status
  output logic  loading
);
  localparam int unsigned NPIX = NPX * NPY;
  localparam int unsigned PXW  = $clog2(NPIX + 1);
  localparam int unsigned CW   = (NC > 1) ? $clog2(NC) : 1;
  localparam int unsigned MAW  = (NPIX > 1) ? $clog2(NPIX) : 1;  // memory address width
  localparam real         PI   = 3.14159265358979323846;
  localparam fp32_t C_FULL = real_to_fp32(real'(NX) * PI / real'(NLINE));
  localparam fp32_t C_HALF = real_to_fp32(real'(NX) * PI / (2.0 * real'(NLINE)));

  typedef enum logic {ST_LOAD, ST_EMIT} state_e;

  state_e        state;
  cplx_t         mem [NC][NPIX];
  logic [PXW-1:0] pix;
  logic [CW-1:0]  coil;

  logic  e1_valid, e1_last;
  cplx_t e1_x  [NC];
  cplx_t e1_b1 [NC];
  fp32_t num, k;
  cplx_t den;

  assign loading = (state == ST_LOAD);

  always_comb begin
    num = FP_ZERO;
    den = '{re: FP_ZERO, im: FP_ZERO};
    for (int c = 0; c < int'(NC); c++) begin
      num = fp_add(num, c_abs2(e1_b1[c]));
      den = c_add(den, c_mul(e1_x[c], e1_b1[c]));
    end
    k = fp_div(fp_mul(halve ? C_HALF : C_FULL, num), c_abs2(den));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= ST_LOAD;
      pix       <= '0;
      coil      <= '0;
      e1_valid  <= 1'b0;
      e1_last   <= 1'b0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      e1_valid  <= 1'b0;
      e1_last   <= 1'b0;
      unique case (state)
        ST_LOAD: if (x_valid) begin
          if (int'(pix) == int'(NPIX) - 1) begin
            pix <= '0;
            if (int'(coil) == int'(NC) - 1) begin
              coil  <= '0;
              state <= ST_EMIT;
            end else begin
              coil <= coil + 1'b1;
            end
          end else begin
            pix <= pix + 1'b1;
          end
        end
        ST_EMIT: if (b1_valid) begin
          e1_valid <= 1'b1;
          e1_last  <= (int'(pix) == int'(NPIX) - 1);
          if (int'(pix) == int'(NPIX) - 1) begin
            pix   <= '0;
            state <= ST_LOAD;
          end else begin
            pix <= pix + 1'b1;
          end
        end
        default: state <= ST_LOAD;
      endcase
      out_valid <= e1_valid;
      out_last  <= e1_last;
    end
    if (state == ST_LOAD && x_valid) mem[coil][MAW'(pix)] <= x;
    if (state == ST_EMIT && b1_valid) begin
      for (int c = 0; c < int'(NC); c++) e1_x[c] <= mem[c][MAW'(pix)];
      e1_b1 <= b1;
    end
    if (e1_valid) out <= '{re: fp_mul(k, den.re), im: fp_neg(fp_mul(k, den.im))};
  end

  property p_no_early_b1;
    @(posedge clk) disable iff (rst) b1_valid |-> state == ST_EMIT;
  endproperty
  property p_no_late_x;
    @(posedge clk) disable iff (rst) x_valid |-> state == ST_LOAD;
  endproperty
  a_no_early_b1: assert property (p_no_early_b1);
  a_no_late_x:   assert property (p_no_late_x);
endmodule
