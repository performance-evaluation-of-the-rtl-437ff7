// iobks_pkg: shared sizes and the cell type of the input and output buffered
// Knockout Switch (IOBKS).
//
// A cell is a fixed-length packet. It carries the address of the output port
// it is destined for and a payload. The switch moves one whole cell per time
// slot per path, and one clock cycle is one time slot throughout this RTL.
//
// Sizes that follow the published sizing study: L = 4 concentrator outputs per bus
// interface, s = 5 cells per input buffer (the depth assumed in all its
// shared-buffer comparisons), and a shared buffer of four packet buffers ten
// cells deep. Sizes that are this design's own choice: N = 32 ports (the
// analysis only assumes a large switch) and a 48-byte payload, the payload of
// an ATM cell; the cell header is reduced to the routing address.
package iobks_pkg;

  // Largest switch the address field can name; modules take N as a parameter.
  localparam int unsigned N_PORTS   = 32;
  localparam int unsigned ADDR_W    = $clog2(N_PORTS);
  localparam int unsigned PAYLOAD_W = 48 * 8;

  // Defaults for the main configuration.
  localparam int unsigned L_CONC    = 4;   // concentrator outputs per bus interface
  localparam int unsigned S_INBUF   = 5;   // input buffer depth in cells
  localparam int unsigned D_SHARED  = 10;  // depth of each of the L packet buffers

  typedef logic [ADDR_W-1:0] addr_t;

  typedef struct packed {
    addr_t                 dest;     // output port the cell is destined for
    logic [PAYLOAD_W-1:0]  payload;
  } cell_t;

endpackage
