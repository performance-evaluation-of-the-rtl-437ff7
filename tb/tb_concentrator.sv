// tb_concentrator: random request patterns, from sparse to heavier than L,
// against a reference of the selection rule: scan from the rotating start,
// grant the first L requesters, put the r-th winner on output r, and start
// the next slot at the first rejected input. Also checks that the first rejected
// input is granted in the next slot if it requests again, and that contention
// (more than L requests) occurred.
module tb_concentrator;
  import iobks_pkg::*;

  localparam int unsigned N = 32;
  localparam int unsigned L = 4;

  logic clk = 0, rst_n = 1;
  logic [N-1:0] req, grant;
  cell_t in_cell [N];
  logic [L-1:0] out_valid;
  cell_t out_cell [L];
  logic [$clog2(N+1)-1:0] n_reject;

  concentrator #(.N(N), .L(L)) dut (.*);

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;

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
    int start = 0;
    int n_contention = 0;
    logic [N-1:0] exp_grant, prev_rej;
    int exp_rej, winners, first_rej;
    int prev_first = -1;
    cell_t exp_out [L];
    prev_rej = '0;
    req = '0;
    for (int i = 0; i < N; i++) in_cell[i] = '0;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int pct;
      pct = (t / 300) * 4;               // from 0% up to 36% of inputs per slot
      for (int i = 0; i < N; i++) begin
        req[i]     = ($urandom_range(99) < pct) || (prev_rej[i] && $urandom_range(1) == 1);
        in_cell[i] = {addr_t'(i), {12{$urandom}}};
      end
      // Reference selection.
      exp_grant = '0; exp_rej = 0; winners = 0; first_rej = -1;
      for (int k = 0; k < L; k++) exp_out[k] = '0;
      for (int p = 0; p < N; p++) begin
        int i;
        i = (start + p) % N;
        if (req[i]) begin
          if (winners < L) begin
            exp_grant[i] = 1'b1;
            exp_out[winners] = in_cell[i];
            winners++;
          end else begin
            exp_rej++;
            if (first_rej < 0) first_rej = i;
          end
        end
      end
      #1;
      check(grant == exp_grant, "grant");
      check(n_reject == exp_rej, "n_reject");
      for (int k = 0; k < L; k++) begin
        check(out_valid[k] == (k < winners), "out_valid");
        if (k < winners) check(out_cell[k] == exp_out[k], "out_cell");
      end
      // The first input turned away last slot, requesting again, must win now.
      if (prev_first >= 0 && req[prev_first]) check(grant[prev_first], "first rejected served next slot");
      prev_first = first_rej;
      if (exp_rej > 0) n_contention++;
      prev_rej = req & ~exp_grant;
      if (first_rej >= 0) start = first_rej;
      @(posedge clk);
      #1;
    end
    check(n_contention > 0, "contention occurred");
    $display("slots with contention: %0d", n_contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
