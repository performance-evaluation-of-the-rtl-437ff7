// tb_input_buffer: random arrivals and acknowledgements against a reference
// of the slot rules: a cell arriving at an empty buffer is the HOL cell of
// its own slot and leaves at once if acknowledged; an arrival while S cells
// are held is lost even if a cell leaves in that slot; an unacknowledged HOL
// cell stays. Checks HOL cell, in_drop, bypass and occupancy every slot and
// that each event occurred.
module tb_input_buffer;
  import iobks_pkg::*;

  localparam int unsigned S = 5;

  logic clk = 0, rst_n = 1;
  logic in_valid, hol_valid, ack, in_drop, bypass;
  cell_t in_cell, hol_cell;
  logic [$clog2(S+1)-1:0] occupancy;

  input_buffer #(.S(S)) dut (.*);

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  int unsigned n_drop = 0, n_bypass = 0, n_blocked = 0;
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
    bit exp_hv, exp_drop, exp_bypass;
    cell_t exp_hol;
    in_valid = 0; ack = 0; in_cell = '0;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      in_valid = ($urandom_range(99) < 60);
      in_cell  = {addr_t'($urandom), {12{$urandom}}};
      #1;
      exp_hv  = (q.size() > 0) || in_valid;
      exp_hol = (q.size() > 0) ? q[0] : in_cell;
      check(hol_valid == exp_hv, "hol_valid");
      if (exp_hv) check(hol_cell == exp_hol, "hol_cell");
      check(occupancy == q.size(), "occupancy");
      // The concentrator acknowledges at random, only a present HOL cell.
      ack = exp_hv && ($urandom_range(99) < ((t % 500) < 250 ? 25 : 75));
      #1;
      exp_drop   = in_valid && q.size() == S;
      exp_bypass = in_valid && q.size() == 0 && ack;
      check(in_drop == exp_drop, "in_drop");
      check(bypass == exp_bypass, "bypass");
      if (exp_drop) n_drop++;
      if (exp_bypass) n_bypass++;
      if (exp_hv && !ack) n_blocked++;
      @(posedge clk);
      if (ack && q.size() > 0) void'(q.pop_front());
      if (in_valid && !exp_drop && !exp_bypass) q.push_back(in_cell);
      #1;
      ack = 0;
    end
    check(n_drop > 0, "overflow occurred");
    check(n_bypass > 0, "bypass occurred");
    check(n_blocked > 0, "HOL blocking occurred");
    $display("drops=%0d bypasses=%0d blocked=%0d", n_drop, n_bypass, n_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
