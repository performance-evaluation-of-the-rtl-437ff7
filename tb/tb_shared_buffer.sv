// tb_shared_buffer: the shared buffer must behave as one FIFO queue of L*D
// cells with up to L arrivals and one departure per slot. Random packed
// arrival patterns (0..L cells per slot, alternating heavy and light phases)
// are compared with a single-queue reference: output order, out_valid,
// occupancy and the number of cells lost on overflow. Also checks the
// one-slot minimum latency and that overflow and pointer wrap-around happen.
module tb_shared_buffer;
  import iobks_pkg::*;

  localparam int unsigned L = 4;
  localparam int unsigned D = 10;

  logic clk = 0, rst_n = 1;
  logic [L-1:0] in_valid;
  cell_t in_cell [L];
  logic out_valid;
  cell_t out_cell;
  logic [$clog2(L+1)-1:0] n_drop;
  logic [$clog2(L*D+1)-1:0] occupancy;

  shared_buffer #(.L(L), .D(D)) dut (.*);

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
    int n_ovf = 0, n_multi = 0, k, room, acc;
    in_valid = '0;
    for (int j = 0; j < L; j++) in_cell[j] = '0;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // Minimum latency: a cell entering an empty buffer leaves in the next slot.
    in_valid = 1; in_cell[0] = {addr_t'(3), {12{32'hA5A5_0001}}};
    #1;
    check(!out_valid, "empty buffer shows no cell");
    @(posedge clk); #1;
    in_valid = '0;
    check(out_valid && out_cell == {addr_t'(3), {12{32'hA5A5_0001}}}, "one-slot latency");
    @(posedge clk); #1;
    check(!out_valid && occupancy == 0, "drained");
    for (int t = 0; t < 6000; t++) begin
      k = ((t / 200) % 2 == 0) ? $urandom_range(L) : $urandom_range(1);
      for (int j = 0; j < L; j++) begin
        in_valid[j] = (j < k);
        in_cell[j]  = {addr_t'($urandom), {11{$urandom}}, 32'(t * L + j)};
      end
      #1;
      check(occupancy == q.size(), "occupancy");
      check(out_valid == (q.size() > 0), "out_valid");
      if (q.size() > 0) check(out_cell == q[0], "out_cell order");
      room = L * D - q.size() + (q.size() > 0 ? 1 : 0);
      acc  = (k < room) ? k : room;
      check(n_drop == k - acc, "n_drop");
      if (k > acc) n_ovf++;
      if (k > 1) n_multi++;
      @(posedge clk);
      if (q.size() > 0) void'(q.pop_front());
      for (int j = 0; j < acc; j++) q.push_back(in_cell[j]);
      #1;
    end
    check(n_ovf > 0, "overflow occurred");
    check(n_multi > 0, "several arrivals in one slot occurred");
    $display("overflow slots=%0d", n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
