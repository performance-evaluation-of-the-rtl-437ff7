// tb_iobks_full: the switch at its default size (N = 32, L = 4, S = 5,
// D = 10) under the traffic its sizing is made for: in every slot a cell
// arrives at each input with probability 0.9, addressed to an output chosen
// uniformly at random. After SLOTS slots the switch is drained.
//
// Checks: every departing cell left on its own output; cells of one input
// to one output keep their order with no duplicates; after draining, every
// accepted cell left or was counted as lost at a full shared buffer; and the
// input buffers add less than 0.1 slot of delay per cell on average. That
// mean extra delay is measured by Little's law: the cells held in input
// buffers at the end of each slot, summed over all slots, divided by the
// number of cells accepted. The run also reports input and shared buffer
// losses, HOL blocking and the carried load.
module tb_iobks_full;
  import iobks_pkg::*;

  localparam int unsigned N     = N_PORTS;
  localparam int unsigned LOAD  = 90;     // percent
  localparam int unsigned SLOTS = 20000;

  logic clk = 0, rst_n = 1;
  logic [N-1:0] in_valid, out_valid, in_drop, hol_blocked, bypass;
  cell_t in_cell [N];
  cell_t out_cell [N];
  logic [$clog2(L_CONC+1)-1:0] sb_drop [N];

  iobks_switch dut (.*);

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  longint unsigned n_bypass = 0, n_blocked = 0, n_in_drop = 0, n_sb_drop = 0;
  longint unsigned offered = 0, accepted = 0, delivered = 0, held = 0;
  int last_seq [N][N];
  int seq      [N];
  int slot = 0;
  bit measuring = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at slot %0d", what, slot);
    end
  endtask

  initial begin
    repeat (SLOTS + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    for (int o = 0; o < N; o++) begin
      if (out_valid[o]) begin
        int src, sq;
        src = int'(out_cell[o].payload[63:56]);
        sq  = int'(out_cell[o].payload[55:24]);
        delivered++;
        check(out_cell[o].dest == addr_t'(o), "cell left on its own output");
        check(src < N && sq > last_seq[src][o], "order kept, no duplicate");
        if (src < N) last_seq[src][o] = sq;
      end
      n_sb_drop += sb_drop[o];
    end
    for (int i = 0; i < N; i++) begin
      if (in_valid[i]) offered++;
      if (in_valid[i] && !in_drop[i]) accepted++;
      if (in_drop[i]) n_in_drop++;
      if (bypass[i]) n_bypass++;
      if (hol_blocked[i]) n_blocked++;
    end
  end

  // Cells left in the input buffers at the end of each slot.
  for (genvar i = 0; i < N; i++) begin : g_occ
    always @(posedge clk) if (rst_n && measuring) begin
      #1 held += dut.g_in[i].u_ibuf.occupancy;
    end
  end

  initial begin
    real d_plus;
    for (int i = 0; i < N; i++) begin
      seq[i] = 0; in_cell[i] = '0;
      for (int o = 0; o < N; o++) last_seq[i][o] = -1;
    end
    in_valid = '0;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    measuring = 1;
    for (int t = 0; t < SLOTS; t++) begin
      for (int i = 0; i < N; i++) begin
        in_valid[i] = ($urandom_range(99) < LOAD);
        in_cell[i].dest    = addr_t'($urandom_range(N - 1));
        in_cell[i].payload = '0;
        in_cell[i].payload[63:56] = 8'(i);
        in_cell[i].payload[55:24] = 32'(seq[i]);
        in_cell[i].payload[23:0]  = 24'(t);
        if (in_valid[i]) seq[i]++;
      end
      @(posedge clk); #1 slot++;
    end
    in_valid = '0;
    repeat (200) begin
      @(posedge clk); #1 slot++;
    end
    measuring = 0;

    d_plus = real'(held) / real'(accepted);
    check(accepted == delivered + n_sb_drop, "every accepted cell left or was lost at a shared buffer");
    check(n_blocked > 0, "HOL blocking happened");
    check(n_bypass > 0, "bypass happened");
    check(d_plus < 0.1, "mean extra delay from input buffering below 0.1 slot");
    $display("offered=%0d accepted=%0d delivered=%0d", offered, accepted, delivered);
    $display("input buffer losses=%0d shared buffer losses=%0d hol_blocked=%0d bypass=%0d",
             n_in_drop, n_sb_drop, n_blocked, n_bypass);
    $display("mean extra delay by input buffering = %f slot", d_plus);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
