// tb_result_fifo: self-checking test of the result FIFO at its full size.
// A queue is the reference model. Phases: read of an empty FIFO (ignored),
// fill to exactly DEPTH entries (full rises only then), a write while full
// (dropped), a write and read in the same cycle while full, drain in order
// (empty rises only at the end), then random mixed traffic that wraps both
// pointers several times. result_out, empty and full are compared with the
// model before every edge.
module tb_result_fifo;
  import conv_pkg::*;

  localparam int DEPTH = 1352;
  localparam int WIDTH = 16;

  logic clk = 0, n_rst = 0;
  logic wenable, renable;
  logic [WIDTH-1:0] result_in, result_out;
  logic empty, full;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] q [$];
  int n_full = 0, n_drop = 0;

  result_fifo dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s (model size %0d)", what, q.size());
    end
  endtask

  // drive one cycle, compare first, then update the model
  task automatic cycle(input bit we, input bit re, input logic [WIDTH-1:0] d);
    bit did_read;
    @(negedge clk);
    wenable = we; renable = re; result_in = d;
    #1;
    chk(empty === (q.size() == 0), "empty flag");
    chk(full === (q.size() == DEPTH), "full flag");
    if (q.size() > 0) chk(result_out === q[0], $sformatf("head %h expected %h", result_out, q[0]));
    else              chk(result_out === '0, "empty shows zero");
    @(posedge clk);
    did_read = re && q.size() > 0;
    if (did_read) void'(q.pop_front());
    if (we) begin
      if (q.size() < DEPTH) q.push_back(d);
      else n_drop++;
    end
    if (q.size() == DEPTH) n_full++;
  endtask

  initial begin
    wenable = 0; renable = 0; result_in = '0;
    repeat (2) @(posedge clk);
    n_rst = 1;
    cycle(0, 1, 16'h1234);                       // read while empty
    for (int i = 0; i < DEPTH; i++) cycle(1, 0, 16'(i * 7 + 3));
    cycle(1, 0, 16'hDEAD);                       // write while full: dropped
    cycle(1, 1, 16'hBEEF);                       // read and write while full
    for (int i = 0; i < DEPTH + 2; i++) cycle(0, 1, 16'h0);
    for (int i = 0; i < 6000; i++) cycle(1'($urandom % 2), 1'($urandom % 5 < 2), 16'($urandom));
    for (int i = 0; i < 4000; i++) cycle(1'($urandom % 3 != 0), 1'($urandom % 4 == 0), 16'($urandom));
    while (q.size() > 0) cycle(0, 1, 16'h0);
    cycle(0, 0, 16'h0);
    chk(n_full > 0, "buffer became full");
    chk(n_drop > 0, "write while full was dropped");
    $display("full cycles %0d, dropped writes %0d", n_full, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
