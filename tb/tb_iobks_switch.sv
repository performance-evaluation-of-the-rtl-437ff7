// tb_iobks_switch: end-to-end test of the switch at N = 8 (L, S and D at
// their defaults of 4, 5 and 10).
//
// Directed part: (1) one cell into an idle switch crosses its empty input
// buffer in its arrival slot and leaves its output in the next slot; (2) six
// inputs address the same output in one slot: four are acknowledged, two stay
// at the head of their input buffers and go in the following slot, and all
// six leave in six consecutive slots.
// Random part: phases of uniform traffic and of hot-spot traffic to one
// output. A scoreboard checks that every departing cell left on its own
// output, that cells of one input to one output keep their order and are
// never duplicated, and after draining that every cell accepted by an input
// buffer either left or was counted as lost at a full shared buffer.
// Every mechanism (bypass, HOL blocking, input buffer overflow, shared
// buffer overflow) must have happened at least once.
module tb_iobks_switch;
  import iobks_pkg::*;

  localparam int unsigned N = 8;
  localparam int unsigned L = L_CONC;
  localparam int unsigned S = S_INBUF;
  localparam int unsigned D = D_SHARED;

  logic clk = 0, rst_n = 1;
  logic [N-1:0] in_valid, out_valid, in_drop, hol_blocked, bypass;
  cell_t in_cell [N];
  cell_t out_cell [N];
  logic [$clog2(L+1)-1:0] sb_drop [N];

  iobks_switch #(.N(N), .L(L), .S(S), .D(D)) dut (.*);

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  int unsigned n_bypass = 0, n_blocked = 0, n_in_drop = 0, n_sb_drop = 0;
  longint unsigned accepted = 0, delivered = 0;
  int last_seq [N][N];     // last sequence number seen per (input, output)
  int seq      [N];        // next sequence number per input
  int slot = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at slot %0d", what, slot);
    end
  endtask

  // Payload layout: [63:56] input, [55:24] sequence number, [23:0] slot.
  function automatic cell_t make_cell(int src, int dst);
    cell_t c;
    c.dest    = addr_t'(dst);
    c.payload = '0;
    c.payload[63:56] = 8'(src);
    c.payload[55:24] = 32'(seq[src]);
    c.payload[23:0]  = 24'(slot);
    c.payload[PAYLOAD_W-1 -: 32] = $urandom;
    return c;
  endfunction

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Scoreboard on the output side, sampled just before each clock edge.
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
      n_sb_drop += int'(sb_drop[o]);
    end
    for (int i = 0; i < N; i++) begin
      if (in_valid[i] && !in_drop[i]) accepted++;
      if (in_drop[i]) n_in_drop++;
      if (bypass[i]) n_bypass++;
      if (hol_blocked[i]) n_blocked++;
    end
  end

  task automatic idle_slots(int n);
    in_valid = '0;
    repeat (n) begin
      @(posedge clk); #1 slot++;
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      seq[i] = 0; in_cell[i] = '0;
      for (int o = 0; o < N; o++) last_seq[i][o] = -1;
    end
    in_valid = '0;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // (1) Latency through an idle switch: one slot.
    in_valid = '0;
    in_valid[2] = 1'b1; in_cell[2] = make_cell(2, 6); seq[2]++;
    #1;
    check(bypass[2] && !hol_blocked[2], "idle input: cell bypasses the buffer");
    check(out_valid == '0, "nothing leaves in the arrival slot");
    @(posedge clk); #1 slot++;
    in_valid = '0;
    check(out_valid == N'(1 << 6), "cell leaves one slot after arrival");
    idle_slots(2);

    // (2) Six cells for output 1 in one slot: L win, the rest wait one slot.
    for (int i = 0; i < 6; i++) begin
      in_valid[i] = 1'b1; in_cell[i] = make_cell(i, 1); seq[i]++;
    end
    #1;
    check($countones(hol_blocked) == 6 - L, "knocked-out cells stay at HOL");
    @(posedge clk); #1 slot++;
    in_valid = '0;
    #1;
    check($countones(hol_blocked) == 0, "waiting cells go in the next slot");
    for (int k = 0; k < 6; k++) begin
      check(out_valid[1], "six consecutive departures on output 1");
      @(posedge clk); #1 slot++;
    end
    check(!out_valid[1], "output 1 drained");
    idle_slots(2);

    // Random traffic: uniform, then hot spot on output 3, repeated.
    for (int t = 0; t < 3000; t++) begin
      bit hot;
      hot = ((t / 300) % 2 == 1);
      for (int i = 0; i < N; i++) begin
        in_valid[i] = ($urandom_range(99) < (hot ? 95 : 85));
        in_cell[i]  = make_cell(i, hot && $urandom_range(99) < 70 ? 3 : $urandom_range(N - 1));
        if (in_valid[i]) seq[i]++;
      end
      @(posedge clk); #1 slot++;
    end
    idle_slots(N * (S + 1) + L * D + 10);

    check(accepted == delivered + n_sb_drop, "every accepted cell left or was lost at a shared buffer");
    check(n_bypass > 0, "bypass happened");
    check(n_blocked > 0, "HOL blocking happened");
    check(n_in_drop > 0, "input buffer overflow happened");
    check(n_sb_drop > 0, "shared buffer overflow happened");
    $display("accepted=%0d delivered=%0d bypass=%0d hol_blocked=%0d in_drop=%0d sb_drop=%0d",
             accepted, delivered, n_bypass, n_blocked, n_in_drop, n_sb_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
