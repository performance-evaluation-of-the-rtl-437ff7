// input_buffer: the FIFO in front of each input's broadcast bus.
//
// Cells arrive at most one per time slot. The head-of-line (HOL) cell is
// offered to the bus every slot; its address goes to the concentrator of the
// addressed output. If that concentrator acknowledges it, the cell is
// transferred and leaves the buffer in the same slot; if not, it stays at the
// head and competes again next slot. No cell is lost at the concentrator.
//
// The slot rules follow the published queueing model of the buffer: a cell
// arriving at an empty buffer can be offered and leave in that same slot (it
// bypasses the storage), and a cell arriving while the buffer held S cells at
// the end of the previous slot is lost (in_drop), even if a cell leaves in
// this slot. Occupancy therefore never exceeds S.
//
// Interface: in_valid/in_cell is the arrival of this slot; hol_valid/hol_cell
// is combinational from the stored head or, on an empty buffer, from the
// arrival; ack is the combinational acknowledgement for the HOL cell. All
// state changes at the clock edge that ends the slot. Reset empties it.
module input_buffer
  import iobks_pkg::*;
#(
  parameter int unsigned S = S_INBUF
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  cell_t                  in_cell,
  output logic                   hol_valid,
  output cell_t                  hol_cell,
  input  logic                   ack,
  output logic                   in_drop,    // arrival lost: buffer was full
  output logic                   bypass,     // arrival left in its own slot
  output logic [$clog2(S+1)-1:0] occupancy
);

  cell_t head;
  logic  empty, full, push, pop;

  packet_fifo #(.DEPTH(S)) u_fifo (
    .clk, .rst_n,
    .push, .push_cell(in_cell),
    .pop,  .head_cell(head),
    .empty, .full, .count(occupancy)
  );

  assign hol_valid = !empty || in_valid;
  assign hol_cell  = empty ? in_cell : head;
  assign pop       = ack && !empty;
  assign bypass    = ack && empty && in_valid;
  assign in_drop   = in_valid && full;
  assign push      = in_valid && !full && !bypass;

  a_ack_needs_hol: assert property (@(posedge clk) disable iff (!rst_n) ack |-> hol_valid);

endmodule
