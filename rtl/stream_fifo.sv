// stream_fifo: synchronous first-in first-out queue used to equalise input latencies.
//
// A kernel needs all of its inputs in the same clock. Inputs come from different
// sources (the host link and on-board memory) and arrive with different delays, so each
// is queued and the kernel fires only when every queue holds data. This is a plain
// circular buffer of DEPTH entries of type T: push when in_valid (must not be full), pop
// when pop is set (must not be empty); head holds the oldest entry combinationally.
// count gives the occupancy. Depth and the handshake are this design's choices.
// Timing: an entry pushed in one clock is visible on head the next clock.
module stream_fifo #(
  parameter type         T     = logic [63:0],
  parameter int unsigned DEPTH = 16
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      push,
  input  T                          din,
  input  logic                      pop,
  output T                          head,
  output logic                      empty,
  output logic                      full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T              buffer [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;

  assign empty = (count == '0);
  assign full  = (int'(count) == int'(DEPTH));
  assign head  = buffer[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (int'(p) == int'(DEPTH) - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      count <= count + ($bits(count))'(push) - ($bits(count))'(pop);
    end
    if (push) buffer[wr_ptr] <= din;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) push |-> !full || pop);
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) pop |-> !empty);
endmodule
