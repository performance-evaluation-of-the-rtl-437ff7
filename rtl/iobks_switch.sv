// iobks_switch: an N x N input and output buffered Knockout Switch.
//
// Every input has an input buffer and its own broadcast bus, and every output
// has a bus interface that sees all N buses, as in the Knockout Switch. What
// the input buffers change: a bus interface concentrates at most L of the
// cells addressed to it per slot, and the cells it turns away are not lost
// but stay at the head of their input buffers and try again in the next
// slot. This lets L be much smaller than the Knockout Switch needs for the
// same loss (L = 4 with 5-cell input buffers at 90% load), and with it the
// number of concentrator switch elements (about L*N per output) and of
// packet buffers (L per output).
//
// One clock cycle is one time slot. In a slot: each input buffer puts its
// head-of-line cell on its bus; each bus interface filters, concentrates and
// returns grants; an input's acknowledgement is the OR of the grants it got
// (only the addressed output can grant); acknowledged cells leave their
// input buffers and enter the shared buffers at the clock edge; every shared
// buffer sends at most one cell to its output. The original scheme sends the cell
// header ahead and the acknowledgement back before the cell itself; this RTL
// does both within the same cycle, so its time slot is that whole exchange.
//
// Ports: in_valid/in_cell are the arrivals of this slot (in_cell.dest < N);
// out_valid/out_cell the departures. The remaining outputs report events of
// the slot: in_drop (input buffer overflow), hol_blocked (HOL cell refused
// by its concentrator), bypass (a cell crossed an empty input buffer in its
// arrival slot), sb_drop (cells lost at a full shared buffer).
module iobks_switch
  import iobks_pkg::*;
#(
  parameter int unsigned N = N_PORTS,
  parameter int unsigned L = L_CONC,
  parameter int unsigned S = S_INBUF,
  parameter int unsigned D = D_SHARED
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic  [N-1:0]           in_valid,
  input  cell_t                   in_cell     [N],
  output logic  [N-1:0]           out_valid,
  output cell_t                   out_cell    [N],
  output logic  [N-1:0]           in_drop,
  output logic  [N-1:0]           hol_blocked,
  output logic  [N-1:0]           bypass,
  output logic  [$clog2(L+1)-1:0] sb_drop     [N]
);

  // Broadcast buses: the HOL cell of every input, seen by every output.
  logic [N-1:0] bus_valid;
  cell_t        bus_cell [N];

  // grant[o][i]: output o acknowledges the HOL cell of input i.
  logic [N-1:0] grant [N];
  logic [N-1:0] ack;

  for (genvar i = 0; i < N; i++) begin : g_in
    input_buffer #(.S(S)) u_ibuf (
      .clk, .rst_n,
      .in_valid(in_valid[i]), .in_cell(in_cell[i]),
      .hol_valid(bus_valid[i]), .hol_cell(bus_cell[i]),
      .ack(ack[i]), .in_drop(in_drop[i]), .bypass(bypass[i]),
      .occupancy()
    );
  end

  // Acknowledgement return path.
  always_comb begin
    ack = '0;
    for (int unsigned o = 0; o < N; o++) ack = ack | grant[o];
  end
  assign hol_blocked = bus_valid & ~ack;

  for (genvar o = 0; o < N; o++) begin : g_out
    bus_interface #(.N(N), .L(L), .D(D), .MY_ADDR(o)) u_bi (
      .clk, .rst_n,
      .bus_valid, .bus_cell,
      .grant(grant[o]),
      .out_valid(out_valid[o]), .out_cell(out_cell[o]),
      .n_reject(), .n_drop(sb_drop[o]), .occupancy()
    );
  end

endmodule
