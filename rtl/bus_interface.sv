// bus_interface: everything that serves one output of the switch.
//
// It listens to all N broadcast buses. N packet filters pass only the cells
// addressed to this output; an N-to-L concentrator selects up to L of them in
// the slot and acknowledges those on the grant lines back towards the input
// buffers; the selected cells enter the shared buffer, which sends one cell
// per slot to the output line. This composition is the original scheme's.
//
// Timing: within one slot the bus cells, the filter results, the
// concentrator's selection and the grants are combinational; the cells are
// stored in the shared buffer at the clock edge ending the slot and can leave
// on out_cell from the next slot on. n_reject counts cells refused by the
// concentrator (they wait at their inputs), n_drop counts cells lost because
// the shared buffer was full.
module bus_interface
  import iobks_pkg::*;
#(
  parameter int unsigned N       = N_PORTS,
  parameter int unsigned L       = L_CONC,
  parameter int unsigned D       = D_SHARED,
  parameter int unsigned MY_ADDR = 0
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [N-1:0]              bus_valid,
  input  cell_t                     bus_cell [N],
  output logic [N-1:0]              grant,
  output logic                      out_valid,
  output cell_t                     out_cell,
  output logic [$clog2(N+1)-1:0]    n_reject,
  output logic [$clog2(L+1)-1:0]    n_drop,
  output logic [$clog2(L*D+1)-1:0]  occupancy
);

  logic [N-1:0] req;
  logic [L-1:0] c_valid;
  cell_t        c_cell [L];

  for (genvar i = 0; i < N; i++) begin : g_filter
    packet_filter #(.MY_ADDR(MY_ADDR)) u_filter (
      .bus_valid(bus_valid[i]), .bus_dest(bus_cell[i].dest), .pass(req[i])
    );
  end

  concentrator #(.N(N), .L(L)) u_conc (
    .clk, .rst_n, .req, .in_cell(bus_cell),
    .grant, .out_valid(c_valid), .out_cell(c_cell), .n_reject
  );

  shared_buffer #(.L(L), .D(D)) u_sbuf (
    .clk, .rst_n, .in_valid(c_valid), .in_cell(c_cell),
    .out_valid, .out_cell, .n_drop, .occupancy
  );

endmodule
