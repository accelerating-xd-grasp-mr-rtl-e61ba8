// transposed_multiplication_kernel: image to coil image, in transposed order, plus the
// temporal-variation term of the objective.
//
// out[i] = x^T[i] * b1[i]      (for the coil selected by the host)
// tv_out = sum_i sqrt(v[i] * conj(v[i]) + l1smooth),  v = xnext - x, or 0 for the last
//          respiratory phase (r == NTRES-1)
// An invocation has two phases, both driven by the input streams:
//  LOAD  NPX*NPY/PFACTOR beats of x and xnext in row-major order. x is written into an
//        on-chip buffer and the temporal-variation sum is accumulated on the fly;
//        tv_out/tv_valid follow 2 clocks after the last LOAD beat.
//  EMIT  NPX*NPY/PFACTOR beats of b1 (coil sensitivities of the current coil, already in
//        transposed order). Each beat reads PFACTOR elements of x in column-major order,
//        multiplies them with b1 and outputs them 2 clocks later; out_last flags the
//        final beat. The kernel then returns to LOAD.
// Replication: the buffer is split into PFACTOR banks by row (row mod PFACTOR); a word
// holds PFACTOR neighbouring pixels of one row. A row-major beat writes one word of one
// bank, and a column-major beat (PFACTOR consecutive rows of one column) reads the same
// word address from every bank, so both directions run at PFACTOR elements per clock.
// NPX and NPY must be multiples of PFACTOR.
// The equations and the on-chip transpose follow the kernel description; the two-phase
// protocol, the banking scheme and the 0-based phase index are this design's choices.
module transposed_multiplication_kernel
  import xdg_pkg::*;
#(
  parameter int unsigned PFACTOR = 1,
  parameter int unsigned NPX     = NPX_DEFAULT,
  parameter int unsigned NPY     = NPY_DEFAULT,
  parameter int unsigned NTRES   = NTRES_DEFAULT
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [$clog2(NTRES)-1:0] r,
  input  fp32_t                    l1smooth,
  // LOAD stream
  input  logic                     x_valid,
  input  cplx_t                    x     [PFACTOR],
  input  cplx_t                    xnext [PFACTOR],
  output logic                     tv_valid,
  output fp32_t                    tv_out,
  // EMIT stream
  input  logic                     b1_valid,
  input  cplx_t                    b1    [PFACTOR],
  output logic                     out_valid,
  output logic                     out_last,
  output cplx_t                    out   [PFACTOR],
  // status
  output logic                     loading
);
  localparam int unsigned WPR   = NPX / PFACTOR;         // words per row
  localparam int unsigned RBLK  = NPY / PFACTOR;         // row blocks
  localparam int unsigned WORDS = WPR * RBLK;            // words per bank
  localparam int unsigned BEATS = NPX * NPY / PFACTOR;   // beats per phase
  localparam int unsigned AW    = $clog2(WORDS + 1);
  localparam int unsigned BW    = $clog2(BEATS + 1);
  localparam int unsigned PW    = (PFACTOR > 1) ? $clog2(PFACTOR) : 1;
  localparam int unsigned MAW   = (WORDS > 1) ? $clog2(WORDS) : 1;  // memory address width

  typedef enum logic {ST_LOAD, ST_EMIT} state_e;
  typedef cplx_t word_t [PFACTOR];

  state_e state;
  word_t  mem [PFACTOR][WORDS];

  // write side counters (row-major)
  logic [AW-1:0] w_base, w_col;   // word address = w_base + w_col
  logic [PW-1:0] w_bank;          // row mod PFACTOR
  // read side counters (column-major)
  logic [AW-1:0] r_base, r_colw;  // word address = r_base + r_colw
  logic [PW-1:0] r_sel;           // column mod PFACTOR
  logic [BW-1:0] beat;

  // TV pipeline
  logic  t1_valid, t1_last;
  fp32_t t1_sum, tv_acc, tv_lane;
  // EMIT pipeline
  logic  e1_valid, e1_last;
  cplx_t e1_x  [PFACTOR];
  cplx_t e1_b1 [PFACTOR];

  assign loading = (state == ST_LOAD);

  always_comb begin
    tv_lane = FP_ZERO;
    for (int p = 0; p < int'(PFACTOR); p++) begin
      cplx_t v;
      if (int'(r) == int'(NTRES) - 1) v = '{re: FP_ZERO, im: FP_ZERO};
      else                            v = c_sub(xnext[p], x[p]);
      tv_lane = fp_add(tv_lane, fp_sqrt(fp_add(c_abs2(v), l1smooth)));
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= ST_LOAD;
      w_base   <= '0;
      w_col    <= '0;
      w_bank   <= '0;
      r_base   <= '0;
      r_colw   <= '0;
      r_sel    <= '0;
      beat     <= '0;
      t1_valid <= 1'b0;
      t1_last  <= 1'b0;
      tv_acc   <= FP_ZERO;
      tv_valid <= 1'b0;
      tv_out   <= FP_ZERO;
      e1_valid <= 1'b0;
      e1_last  <= 1'b0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      t1_valid  <= 1'b0;
      t1_last   <= 1'b0;
      e1_valid  <= 1'b0;
      e1_last   <= 1'b0;
      unique case (state)
        ST_LOAD: if (x_valid) begin
          t1_valid <= 1'b1;
          t1_last  <= (int'(beat) == int'(BEATS) - 1);
          if (int'(w_col) == int'(WPR) - 1) begin
            w_col <= '0;
            if (int'(w_bank) == int'(PFACTOR) - 1) begin
              w_bank <= '0;
              w_base <= w_base + AW'(WPR);
            end else begin
              w_bank <= w_bank + 1'b1;
            end
          end else begin
            w_col <= w_col + 1'b1;
          end
          if (int'(beat) == int'(BEATS) - 1) begin
            beat   <= '0;
            w_base <= '0;
            w_col  <= '0;
            w_bank <= '0;
            state  <= ST_EMIT;
          end else begin
            beat <= beat + 1'b1;
          end
        end
        ST_EMIT: if (b1_valid) begin
          e1_valid <= 1'b1;
          e1_last  <= (int'(beat) == int'(BEATS) - 1);
          if (int'(r_base) == int'(WORDS - WPR)) begin
            r_base <= '0;
            if (int'(r_sel) == int'(PFACTOR) - 1) begin
              r_sel  <= '0;
              r_colw <= r_colw + 1'b1;
            end else begin
              r_sel <= r_sel + 1'b1;
            end
          end else begin
            r_base <= r_base + AW'(WPR);
          end
          if (int'(beat) == int'(BEATS) - 1) begin
            beat   <= '0;
            r_base <= '0;
            r_colw <= '0;
            r_sel  <= '0;
            state  <= ST_LOAD;
          end else begin
            beat <= beat + 1'b1;
          end
        end
        default: state <= ST_LOAD;
      endcase
      // temporal variation accumulation
      tv_valid <= t1_valid & t1_last;
      if (t1_valid) begin
        if (t1_last) begin
          tv_out <= fp_add(tv_acc, t1_sum);
          tv_acc <= FP_ZERO;
        end else begin
          tv_acc <= fp_add(tv_acc, t1_sum);
        end
      end
      out_valid <= e1_valid;
      out_last  <= e1_last;
    end
    // datapath registers and buffer
    if (state == ST_LOAD && x_valid) begin
      mem[w_bank][MAW'(w_base + w_col)] <= x;
      t1_sum <= tv_lane;
    end
    if (state == ST_EMIT && b1_valid) begin
      for (int p = 0; p < int'(PFACTOR); p++) e1_x[p] <= mem[p][MAW'(r_base + r_colw)][r_sel];
      e1_b1 <= b1;
    end
    if (e1_valid)
      for (int p = 0; p < int'(PFACTOR); p++) out[p] <= c_mul(e1_x[p], e1_b1[p]);
  end

  // A b1 beat outside EMIT or an x beat outside LOAD is a protocol error.
  property p_no_early_b1;
    @(posedge clk) disable iff (rst) b1_valid |-> state == ST_EMIT;
  endproperty
  property p_no_late_x;
    @(posedge clk) disable iff (rst) x_valid |-> state == ST_LOAD;
  endproperty
  a_no_early_b1: assert property (p_no_early_b1);
  a_no_late_x:   assert property (p_no_late_x);
endmodule
