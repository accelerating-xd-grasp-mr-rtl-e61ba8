// tb_stream_fifo: random pushes and pops on a 4-entry queue of 16-bit words, compared
// with a reference queue: head value, empty, full and count every clock. The queue is
// driven to full and to empty several times.
module tb_stream_fifo;
  localparam int DEPTH = 4;

  logic        clk = 1'b0, rst = 1'b1;
  logic        push = 1'b0, pop = 1'b0;
  logic [15:0] din = '0, head;
  logic        empty, full;
  logic [2:0]  count;

  logic [15:0] model [$];
  int checks = 0, failures = 0, fulls = 0, empties = 0;

  stream_fifo #(.T(logic [15:0]), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      // compare state
      checks += 3;
      if (empty != (model.size() == 0)) failures++;
      if (full != (model.size() == DEPTH)) failures++;
      if (int'(count) != model.size()) failures++;
      if (model.size() != 0) begin
        checks++;
        if (head !== model[0]) begin
          failures++;
          $display("head %h want %h", head, model[0]);
        end
      end
      if (full) fulls++;
      if (empty) empties++;
      // next action, biased in phases towards filling or draining
      push = ((k / 50) % 2 == 0) ? ($urandom % 4 != 0) : ($urandom % 4 == 0);
      pop  = ((k / 50) % 2 == 0) ? ($urandom % 4 == 0) : ($urandom % 4 != 0);
      if (model.size() == DEPTH) push = 1'b0;
      if (model.size() == 0) pop = 1'b0;
      din = 16'($urandom);
      if (pop) void'(model.pop_front());
      if (push) model.push_back(din);
    end
    checks++;
    if (fulls == 0 || empties == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
