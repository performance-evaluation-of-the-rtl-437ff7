// tb_packet_fifo: random push/pop traffic against a queue reference model.
// Checks head cell, empty, full and count every cycle, including pushes on a
// full FIFO with and without a simultaneous pop.
module tb_packet_fifo;
  import iobks_pkg::*;

  localparam int unsigned DEPTH = 10;

  logic clk = 0, rst_n = 1;
  logic push, pop, empty, full;
  cell_t push_cell, head_cell;
  logic [$clog2(DEPTH+1)-1:0] count;

  packet_fifo #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  cell_t q[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned n_full_push = 0;
    push = 0; pop = 0; push_cell = '0;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      // Bias towards filling in the first half, draining in the second.
      push = ($urandom_range(99) < ((t % 400) < 200 ? 80 : 30));
      pop  = (q.size() > 0) && ($urandom_range(99) < ((t % 400) < 200 ? 30 : 80));
      push_cell.dest    = addr_t'($urandom);
      push_cell.payload = {12{$urandom}};
      #1;
      check(empty == (q.size() == 0), "empty");
      check(full == (q.size() == DEPTH), "full");
      check(count == q.size(), "count");
      if (q.size() > 0) check(head_cell == q[0], "head");
      @(posedge clk);
      if (push && q.size() == DEPTH) n_full_push++;
      if (pop) void'(q.pop_front());
      if (push && q.size() < DEPTH) q.push_back(push_cell);
      #1;
    end
    check(n_full_push > 0, "full FIFO was pushed at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
