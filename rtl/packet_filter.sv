// packet_filter: the address filter at one input of a bus interface.
//
// Each bus interface watches all N broadcast buses through N filters. A filter
// compares the address of the cell on its bus bit by bit with the address of
// its own output and passes the cell's request on to the concentrator only if
// every bit matches; cells for other outputs are blocked. Purely
// combinational. The comparison follows the original scheme; expressing the
// address as a parameter and the valid qualifier are this design's choices.
module packet_filter
  import iobks_pkg::*;
#(
  parameter int unsigned MY_ADDR = 0
) (
  input  logic  bus_valid,
  input  addr_t bus_dest,
  output logic  pass
);

  localparam addr_t MINE = addr_t'(MY_ADDR);

  // Bitwise equality: each bit of the address must match the output's own.
  assign pass = bus_valid && (&(bus_dest ~^ MINE));

endmodule
