// tb_iobks_load_sweep: the load and concentrator-size points of the delay
// evaluation, run side by side at N = 16 with 5-cell input buffers.
//
// Each row is a switch with its own L, fed with Bernoulli arrivals of the
// row's load and uniformly random destinations. For each row the run reports
// cells offered, input buffer losses, shared buffer losses and the mean extra
// delay added by input buffering (cells held in input buffers at the end of
// each slot, summed, divided by cells accepted). Checks: the extra delay stays
// below 0.1 slot in every row, and every accepted cell is accounted for after
// draining. Rows (load %, L): 60/3, 70/3, 80/3, 90/4, 99/5, 70/4, 80/4, 90/5,
// 99/6.
module tb_iobks_load_sweep;
  import iobks_pkg::*;

  localparam int unsigned N     = 16;
  localparam int unsigned S     = 5;
  localparam int unsigned ROWS  = 9;
  localparam int unsigned SLOTS = 3000;
  localparam int unsigned LOADS [ROWS] = '{60, 70, 80, 90, 99, 70, 80, 90, 99};
  localparam int unsigned LS    [ROWS] = '{3, 3, 3, 4, 5, 4, 4, 5, 6};

  logic clk = 0, rst_n = 1;
  bit   traffic = 0, measuring = 0;
  int unsigned checks = 0, failures = 0;
  longint unsigned accepted [ROWS], delivered [ROWS], lost_in [ROWS], lost_sb [ROWS], held [ROWS];

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
        in_valid[i]     = traffic && ($urandom_range(99) < LOADS[r]);
        in_cell[i].dest = addr_t'($urandom_range(N - 1));
        in_cell[i].payload = '0;
      end
    end

    always @(negedge clk) if (rst_n && measuring) begin
      for (int i = 0; i < N; i++) begin
        if (in_valid[i] && !in_drop[i]) accepted[r]++;
        if (in_drop[i]) lost_in[r]++;
        if (out_valid[i]) delivered[r]++;
        lost_sb[r] += sb_drop[i];
      end
    end

    for (genvar i = 0; i < N; i++) begin : g_occ
      always @(posedge clk) if (rst_n && measuring) begin
        #2 held[r] += dut.g_in[i].u_ibuf.occupancy;
      end
    end
  end

  initial begin
    repeat (SLOTS + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < ROWS; r++) begin
      accepted[r] = 0; delivered[r] = 0; lost_in[r] = 0; lost_sb[r] = 0; held[r] = 0;
    end
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    measuring = 1;
    traffic = 1;
    repeat (SLOTS) @(posedge clk);
    traffic = 0;
    repeat (300) @(posedge clk);
    #3 measuring = 0;
    for (int r = 0; r < ROWS; r++) begin
      real d_plus;
      d_plus = real'(held[r]) / real'(accepted[r]);
      checks++;
      if (accepted[r] != delivered[r] + lost_sb[r]) begin
        failures++;
        $display("FAIL row %0d: accepted %0d, delivered %0d, lost %0d", r, accepted[r], delivered[r], lost_sb[r]);
      end
      checks++;
      if (!(d_plus < 0.1)) begin
        failures++;
        $display("FAIL row %0d: extra delay %f slot", r, d_plus);
      end
      $display("load=0.%02d L=%0d accepted=%0d input_losses=%0d shared_losses=%0d extra_delay=%f",
               LOADS[r], LS[r], accepted[r], lost_in[r], lost_sb[r], d_plus);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
