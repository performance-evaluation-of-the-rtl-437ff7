// tb_bus_interface: one output's bus interface fed with random bus traffic to
// all destinations. A reference built from the three rules (address filter,
// rotating selection of at most L, one FIFO queue of L*D cells) predicts the
// grants, the number of rejected requests, the output cell sequence and the
// cells lost to overflow. Small D makes overflow happen.
module tb_bus_interface;
  import iobks_pkg::*;

  localparam int unsigned N    = 8;
  localparam int unsigned L    = 4;
  localparam int unsigned D    = 3;
  localparam int unsigned MINE = 5;

  logic clk = 0, rst_n = 1;
  logic [N-1:0] bus_valid, grant;
  cell_t bus_cell [N];
  logic out_valid;
  cell_t out_cell;
  logic [$clog2(N+1)-1:0] n_reject;
  logic [$clog2(L+1)-1:0] n_drop;
  logic [$clog2(L*D+1)-1:0] occupancy;

  bus_interface #(.N(N), .L(L), .D(D), .MY_ADDR(MINE)) dut (.*);

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
    int start = 0, n_rej_slots = 0, n_ovf = 0;
    int winners, rej, first_rej, room, acc;
    logic [N-1:0] exp_grant;
    cell_t won [$];
    bus_valid = '0;
    for (int i = 0; i < N; i++) bus_cell[i] = '0;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      // Phases with many cells for this output, and phases with few.
      for (int i = 0; i < N; i++) begin
        bus_valid[i] = ($urandom_range(99) < 80);
        bus_cell[i].dest = ((t / 250) % 2 == 0 && $urandom_range(99) < 60) ? addr_t'(MINE)
                                                                              : addr_t'($urandom_range(N - 1));
        bus_cell[i].payload = {{11{$urandom}}, 32'(t * N + i)};
      end
      exp_grant = '0; winners = 0; rej = 0; first_rej = -1;
      won.delete();
      for (int p = 0; p < N; p++) begin
        int i;
        i = (start + p) % N;
        if (bus_valid[i] && bus_cell[i].dest == MINE) begin
          if (winners < L) begin
            exp_grant[i] = 1'b1;
            won.push_back(bus_cell[i]);
            winners++;
          end else begin
            rej++;
            if (first_rej < 0) first_rej = i;
          end
        end
      end
      room = L * D - q.size() + (q.size() > 0 ? 1 : 0);
      acc  = (winners < room) ? winners : room;
      #1;
      check(grant == exp_grant, "grant");
      check(n_reject == rej, "n_reject");
      check(n_drop == winners - acc, "n_drop");
      check(out_valid == (q.size() > 0), "out_valid");
      if (q.size() > 0) check(out_cell == q[0], "out_cell");
      check(occupancy == q.size(), "occupancy");
      if (rej > 0) n_rej_slots++;
      if (winners > acc) n_ovf++;
      if (first_rej >= 0) start = first_rej;
      @(posedge clk);
      if (q.size() > 0) void'(q.pop_front());
      for (int j = 0; j < acc; j++) q.push_back(won[j]);
      #1;
    end
    check(n_rej_slots > 0, "concentrator contention occurred");
    check(n_ovf > 0, "shared buffer overflow occurred");
    $display("contention slots=%0d overflow slots=%0d", n_rej_slots, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
