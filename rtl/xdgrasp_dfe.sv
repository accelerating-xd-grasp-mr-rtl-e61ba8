// xdgrasp_dfe: the FPGA side of the heterogeneous XD-GRASP reconstruction.
//
// The host CPU (or GPU) runs the non-uniform FFTs; everything else in the conjugate
// gradient loop runs here, as seven streaming kernels that the host invokes one at a
// time while the NUFFT of the next task is computed. Each kernel has its own streams:
// vectors that change every call (images, NUFFT outputs) come over the host link,
// fixed datasets (kdatau: sorted k-space data, wu: density compensation, b1: coil
// sensitivities) are kept in on-board memory and streamed from there. The memory
// controller and the host link are outside this module, so their streams are ports.
//
//   multiplication            kdatau*wu                      -> type 1 NUFFT input
//   combine_across_coils      NUFFT images of all coils      -> one phase image
//   transposed_multiplication image -> per-coil image (transposed) + TV objective term
//   post_nufft_type2          type 2 NUFFT output residual   -> gradient path
//   objective                 type 2 NUFFT output            -> line-search cost
//   grad                      data gradient + TV gradient    -> gradient, its norm
//   update                    a*sa + b*sb and a dot product  -> step application
//
// Where a kernel joins a host stream with an on-board-memory stream (objective and
// post_nufft_type2: x from the host, kdatau and wu from memory), each stream first enters
// a stream_fifo, and the kernel consumes a beat only when both queues hold one. This
// equalises the different arrival times of the two sources. The *_stall outputs are set
// in clocks where one queue holds data but the other does not.
// All timing, lane counts (P_* parameters, the per-kernel replication factor) and sizes
// are those of the individual kernels. The split of datasets between host link and
// on-board memory follows the design description; the FIFO depth is this design's choice.
module xdgrasp_dfe
  import xdg_pkg::*;
#(
  parameter int unsigned NPX        = NPX_DEFAULT,
  parameter int unsigned NPY        = NPY_DEFAULT,
  parameter int unsigned NTRES      = NTRES_DEFAULT,
  parameter int unsigned NC         = NC_DEFAULT,
  parameter int unsigned NX         = NX_DEFAULT,
  parameter int unsigned NLINE      = NLINE_DEFAULT,
  parameter int unsigned P_MULT     = 1,
  parameter int unsigned P_OBJ      = 1,
  parameter int unsigned P_POST     = 1,
  parameter int unsigned P_UPD      = 1,
  parameter int unsigned P_GRAD     = 1,
  parameter int unsigned P_TMUL     = 1,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  // ---- scalars written by the host
  input  logic [$clog2(NTRES)-1:0] r,
  input  fp32_t                    l1smooth,
  input  fp32_t                    tv_weight,
  input  fp32_t                    scale_a,
  input  fp32_t                    scale_b,
  input  logic                     halve,
  // ---- multiplication (both inputs from on-board memory)
  input  logic                     mult_valid,
  input  logic                     mult_last,
  input  cplx_t                    mult_kdatau [P_MULT],
  input  fp32_t                    mult_wu     [P_MULT],
  output logic                     mult_out_valid,
  output logic                     mult_out_last,
  output cplx_t                    mult_out    [P_MULT],
  // ---- objective: x from host, kdatau/wu from on-board memory
  input  logic                     obj_x_valid,
  input  logic                     obj_x_last,
  input  cplx_t                    obj_x       [P_OBJ],
  input  logic                     obj_m_valid,
  input  cplx_t                    obj_kdatau  [P_OBJ],
  input  fp32_t                    obj_wu      [P_OBJ],
  output logic                     obj_x_full,
  output logic                     obj_m_full,
  output logic                     obj_stall,
  output logic                     obj_out_valid,
  output fp32_t                    obj_out,
  // ---- post_nufft_type2: x from host, kdatau/wu from on-board memory
  input  logic                     post_x_valid,
  input  logic                     post_x_last,
  input  cplx_t                    post_x      [P_POST],
  input  logic                     post_m_valid,
  input  cplx_t                    post_kdatau [P_POST],
  input  fp32_t                    post_wu     [P_POST],
  output logic                     post_x_full,
  output logic                     post_m_full,
  output logic                     post_stall,
  output logic                     post_out_valid,
  output logic                     post_out_last,
  output cplx_t                    post_out    [P_POST],
  // ---- update
  input  logic                     upd_valid,
  input  logic                     upd_last,
  input  cplx_t                    upd_a       [P_UPD],
  input  cplx_t                    upd_b       [P_UPD],
  output logic                     upd_out_valid,
  output logic                     upd_out_last,
  output cplx_t                    upd_out     [P_UPD],
  output logic                     upd_conj_valid,
  output cplx_t                    upd_conj_mult,
  // ---- grad
  input  logic                     grad_valid,
  input  logic                     grad_last,
  input  cplx_t                    grad_l2grad [P_GRAD],
  input  cplx_t                    grad_x      [P_GRAD],
  input  cplx_t                    grad_xprev  [P_GRAD],
  input  cplx_t                    grad_xnext  [P_GRAD],
  output logic                     grad_out_valid,
  output logic                     grad_out_last,
  output cplx_t                    grad_res    [P_GRAD],
  output logic                     grad_conj_valid,
  output fp32_t                    grad_conj_mult,
  // ---- transposed multiplication: x/xnext from host, b1 from on-board memory
  input  logic                     tmul_x_valid,
  input  cplx_t                    tmul_x      [P_TMUL],
  input  cplx_t                    tmul_xnext  [P_TMUL],
  input  logic                     tmul_b1_valid,
  input  cplx_t                    tmul_b1     [P_TMUL],
  output logic                     tmul_loading,
  output logic                     tmul_tv_valid,
  output fp32_t                    tmul_tv_out,
  output logic                     tmul_out_valid,
  output logic                     tmul_out_last,
  output cplx_t                    tmul_out    [P_TMUL],
  // ---- combine across coils: x from host, b1 from on-board memory
  input  logic                     comb_x_valid,
  input  cplx_t                    comb_x,
  input  logic                     comb_b1_valid,
  input  cplx_t                    comb_b1     [NC],
  output logic                     comb_loading,
  output logic                     comb_out_valid,
  output logic                     comb_out_last,
  output cplx_t                    comb_out
);
  localparam int unsigned CNTW = $clog2(FIFO_DEPTH + 1);

  // -------------------------------------------------------------- multiplication
  multiplication_kernel #(.PFACTOR(P_MULT)) u_mult (
    .clk, .rst,
    .in_valid (mult_valid),
    .in_last  (mult_last),
    .kdatau   (mult_kdatau),
    .wu       (mult_wu),
    .out_valid(mult_out_valid),
    .out_last (mult_out_last),
    .out      (mult_out)
  );

  // -------------------------------------------------------------- objective
  typedef struct packed {
    logic  last;
    cplx_t [P_OBJ-1:0] x;
  } obj_host_t;
  typedef struct packed {
    cplx_t [P_OBJ-1:0] kdatau;
    fp32_t [P_OBJ-1:0] wu;
  } obj_mem_t;

  obj_host_t       obj_h_in, obj_h_head;
  obj_mem_t        obj_m_in, obj_m_head;
  logic            obj_h_empty, obj_m_empty, obj_fire;
  logic [CNTW-1:0] obj_h_count, obj_m_count;  // queue fill levels, kept for debug
  cplx_t           obj_x_k  [P_OBJ];
  cplx_t           obj_kd_k [P_OBJ];
  fp32_t           obj_wu_k [P_OBJ];

  always_comb begin
    obj_h_in.last = obj_x_last;
    for (int p = 0; p < int'(P_OBJ); p++) begin
      obj_h_in.x[p]      = obj_x[p];
      obj_m_in.kdatau[p] = obj_kdatau[p];
      obj_m_in.wu[p]     = obj_wu[p];
      obj_x_k[p]         = obj_h_head.x[p];
      obj_kd_k[p]        = obj_m_head.kdatau[p];
      obj_wu_k[p]        = obj_m_head.wu[p];
    end
  end
  assign obj_fire  = !obj_h_empty && !obj_m_empty;
  assign obj_stall = obj_h_empty != obj_m_empty;

  stream_fifo #(.T(obj_host_t), .DEPTH(FIFO_DEPTH)) u_obj_hq (
    .clk, .rst, .push(obj_x_valid), .din(obj_h_in), .pop(obj_fire),
    .head(obj_h_head), .empty(obj_h_empty), .full(obj_x_full), .count(obj_h_count)
  );
  stream_fifo #(.T(obj_mem_t), .DEPTH(FIFO_DEPTH)) u_obj_mq (
    .clk, .rst, .push(obj_m_valid), .din(obj_m_in), .pop(obj_fire),
    .head(obj_m_head), .empty(obj_m_empty), .full(obj_m_full), .count(obj_m_count)
  );
  objective_kernel #(.PFACTOR(P_OBJ)) u_obj (
    .clk, .rst,
    .in_valid (obj_fire),
    .in_last  (obj_h_head.last),
    .x        (obj_x_k),
    .kdatau   (obj_kd_k),
    .wu       (obj_wu_k),
    .out_valid(obj_out_valid),
    .out      (obj_out)
  );

  // -------------------------------------------------------------- post NUFFT type 2
  typedef struct packed {
    logic  last;
    cplx_t [P_POST-1:0] x;
  } post_host_t;
  typedef struct packed {
    cplx_t [P_POST-1:0] kdatau;
    fp32_t [P_POST-1:0] wu;
  } post_mem_t;

  post_host_t      post_h_in, post_h_head;
  post_mem_t       post_m_in, post_m_head;
  logic            post_h_empty, post_m_empty, post_fire;
  logic [CNTW-1:0] post_h_count, post_m_count;  // queue fill levels, kept for debug
  cplx_t           post_x_k  [P_POST];
  cplx_t           post_kd_k [P_POST];
  fp32_t           post_wu_k [P_POST];

  always_comb begin
    post_h_in.last = post_x_last;
    for (int p = 0; p < int'(P_POST); p++) begin
      post_h_in.x[p]      = post_x[p];
      post_m_in.kdatau[p] = post_kdatau[p];
      post_m_in.wu[p]     = post_wu[p];
      post_x_k[p]         = post_h_head.x[p];
      post_kd_k[p]        = post_m_head.kdatau[p];
      post_wu_k[p]        = post_m_head.wu[p];
    end
  end
  assign post_fire  = !post_h_empty && !post_m_empty;
  assign post_stall = post_h_empty != post_m_empty;

  stream_fifo #(.T(post_host_t), .DEPTH(FIFO_DEPTH)) u_post_hq (
    .clk, .rst, .push(post_x_valid), .din(post_h_in), .pop(post_fire),
    .head(post_h_head), .empty(post_h_empty), .full(post_x_full), .count(post_h_count)
  );
  stream_fifo #(.T(post_mem_t), .DEPTH(FIFO_DEPTH)) u_post_mq (
    .clk, .rst, .push(post_m_valid), .din(post_m_in), .pop(post_fire),
    .head(post_m_head), .empty(post_m_empty), .full(post_m_full), .count(post_m_count)
  );
  post_nufft_type2_kernel #(.PFACTOR(P_POST)) u_post (
    .clk, .rst,
    .in_valid (post_fire),
    .in_last  (post_h_head.last),
    .x        (post_x_k),
    .kdatau   (post_kd_k),
    .wu       (post_wu_k),
    .out_valid(post_out_valid),
    .out_last (post_out_last),
    .out      (post_out)
  );

  // -------------------------------------------------------------- update
  update_kernel #(.PFACTOR(P_UPD)) u_upd (
    .clk, .rst,
    .scale_a, .scale_b,
    .in_valid  (upd_valid),
    .in_last   (upd_last),
    .a         (upd_a),
    .b         (upd_b),
    .out_valid (upd_out_valid),
    .out_last  (upd_out_last),
    .out       (upd_out),
    .conj_valid(upd_conj_valid),
    .conj_mult (upd_conj_mult)
  );

  // -------------------------------------------------------------- grad
  grad_kernel #(.PFACTOR(P_GRAD), .NTRES(NTRES)) u_grad (
    .clk, .rst,
    .r, .l1smooth, .tv_weight,
    .in_valid  (grad_valid),
    .in_last   (grad_last),
    .l2grad    (grad_l2grad),
    .x         (grad_x),
    .xprev     (grad_xprev),
    .xnext     (grad_xnext),
    .out_valid (grad_out_valid),
    .out_last  (grad_out_last),
    .res       (grad_res),
    .conj_valid(grad_conj_valid),
    .conj_mult (grad_conj_mult)
  );

  // -------------------------------------------------------------- transposed multiplication
  transposed_multiplication_kernel #(
    .PFACTOR(P_TMUL), .NPX(NPX), .NPY(NPY), .NTRES(NTRES)
  ) u_tmul (
    .clk, .rst,
    .r, .l1smooth,
    .x_valid  (tmul_x_valid),
    .x        (tmul_x),
    .xnext    (tmul_xnext),
    .tv_valid (tmul_tv_valid),
    .tv_out   (tmul_tv_out),
    .b1_valid (tmul_b1_valid),
    .b1       (tmul_b1),
    .out_valid(tmul_out_valid),
    .out_last (tmul_out_last),
    .out      (tmul_out),
    .loading  (tmul_loading)
  );

  // -------------------------------------------------------------- combine across coils
  combine_across_coils_kernel #(
    .NPX(NPX), .NPY(NPY), .NC(NC), .NX(NX), .NLINE(NLINE)
  ) u_comb (
    .clk, .rst,
    .halve,
    .x_valid  (comb_x_valid),
    .x        (comb_x),
    .b1_valid (comb_b1_valid),
    .b1       (comb_b1),
    .out_valid(comb_out_valid),
    .out_last (comb_out_last),
    .out      (comb_out),
    .loading  (comb_loading)
  );
endmodule
