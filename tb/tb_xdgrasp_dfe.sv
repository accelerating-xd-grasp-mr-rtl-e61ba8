// tb_xdgrasp_dfe: end-to-end test of the FPGA side at reduced size (8x4 images,
// 4 phases, 2 coils, 2 lanes per kernel, 4-entry queues, 64 k-space samples).
// The sequence and the checks are in tb_xdgrasp_dfe_body.svh.
module tb_xdgrasp_dfe;
  import xdg_pkg::*;
  import tb_fp_pkg::*;

  localparam int NPX        = 8;
  localparam int NPY        = 4;
  localparam int NTRES      = 4;
  localparam int NC         = 2;
  localparam int NX         = 16;
  localparam int NLINE      = 4;
  localparam int P          = 2;
  localparam int FIFO_DEPTH = 4;
  localparam int WATCHDOG   = 20000;

  xdgrasp_dfe #(
    .NPX(NPX), .NPY(NPY), .NTRES(NTRES), .NC(NC), .NX(NX), .NLINE(NLINE),
    .P_MULT(P), .P_OBJ(P), .P_POST(P), .P_UPD(P), .P_GRAD(P), .P_TMUL(P),
    .FIFO_DEPTH(FIFO_DEPTH)
  ) dut (.*);

`include "tb_xdgrasp_dfe_body.svh"
endmodule
