// tb_xdgrasp_dfe_full: the same end-to-end sequence as tb_xdgrasp_dfe with the design at
// its default size: 320x320 images, 8 phases, 8 coils, one lane per kernel, 16-entry
// queues and 640x40 k-space samples per phase and coil.
module tb_xdgrasp_dfe_full;
  import xdg_pkg::*;
  import tb_fp_pkg::*;

  localparam int NPX        = NPX_DEFAULT;
  localparam int NPY        = NPY_DEFAULT;
  localparam int NTRES      = NTRES_DEFAULT;
  localparam int NC         = NC_DEFAULT;
  localparam int NX         = NX_DEFAULT;
  localparam int NLINE      = NLINE_DEFAULT;
  localparam int P          = 1;
  localparam int FIFO_DEPTH = 16;
  localparam int WATCHDOG   = 4000000;

  xdgrasp_dfe dut (.*);

`include "tb_xdgrasp_dfe_body.svh"
endmodule
