// tb_iobks_saturation: maximum throughput versus concentrator size.
//
// Switches with L = 1, 2, 3, 4, 6 and 8 run side by side at N = 16, S = 5,
// with every input saturated (a cell arrives in every slot, uniformly
// addressed). Input buffers then stay full, so the rate at which cells pass
// the concentrators is limited only by HOL blocking. Throughput per row is
// (cells that passed a concentrator) / (N x slots); every input offers a HOL
// cell in every slot, so the cells that passed are those not HOL-blocked.
// Checks: throughput
// rises with L; L = 1 lies between 0.55 and 0.70 (single-FIFO HOL limit,
// about 0.6); L = 4 and above exceed 0.97. The analytic values for an
// infinite switch are 0.632, 0.896, 0.977, 0.996, 0.9999 and 0.999999.
module tb_iobks_saturation;
  import iobks_pkg::*;

  localparam int unsigned N     = 16;
  localparam int unsigned S     = 5;
  localparam int unsigned ROWS  = 6;
  localparam int unsigned SLOTS = 4000;
  localparam int unsigned WARM  = 200;
  localparam int unsigned LS [ROWS] = '{1, 2, 3, 4, 6, 8};

  logic clk = 0, rst_n = 1;
  bit   measuring = 0;
  int unsigned checks = 0, failures = 0;
  longint unsigned passed [ROWS];
  real thr [ROWS];

  always #5 clk = ~clk;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    localparam int unsigned L = LS[r];
    logic [N-1:0] in_valid, out_valid, in_drop, hol_blocked, bypass;
    cell_t in_cell [N];
    cell_t out_cell [N];
    logic [$clog2(L+1)-1:0] sb_drop [N];

    iobks_switch #(.N(N), .L(L), .S(S)) dut (.*);

    always @(posedge clk) begin
      #1;
      for (int i = 0; i < N; i++) begin
        in_valid[i]        = rst_n;
        in_cell[i].dest    = addr_t'($urandom_range(N - 1));
        in_cell[i].payload = '0;
      end
    end

    always @(negedge clk) if (rst_n && measuring) begin
      // Every input holds a HOL cell; those not blocked pass this slot.
      passed[r] += N - $countones(hol_blocked);
    end
  end

  initial begin
    repeat (SLOTS + WARM + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int r = 0; r < ROWS; r++) passed[r] = 0;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (WARM) @(posedge clk);
    measuring = 1;
    repeat (SLOTS) @(posedge clk);
    #2 measuring = 0;
    for (int r = 0; r < ROWS; r++) begin
      thr[r] = real'(passed[r]) / real'(N * SLOTS);
      $display("L=%0d throughput=%f", LS[r], thr[r]);
    end
    for (int r = 1; r < ROWS; r++) check(thr[r] >= thr[r-1] - 0.005, "throughput rises with L");
    check(thr[0] > 0.55 && thr[0] < 0.70, "L=1 at the HOL-blocking limit");
    for (int r = 3; r < ROWS; r++) check(thr[r] > 0.97, "L>=4 above 0.97");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
