// packet_fifo: a first-in first-out buffer of whole cells.
//
// It is one of the L separate packet buffers of a shared buffer, and also the
// storage behind each input buffer. Storage is an array of DEPTH cells with a
// read and a write pointer and an occupancy count. A push and a pop may happen
// in the same cycle, also on a full FIFO. A push on a full FIFO without a
// simultaneous pop is ignored (the caller decides whether that is a loss).
//
// Interface: push/push_cell write at the clock edge; the head cell is visible
// combinationally on head_cell while empty is low, and pop removes it at the
// edge. count is the occupancy after the last edge. Reset empties the FIFO.
// The FIFO structure is the original scheme's; pointers, count and the same-cycle
// push/pop rule are this design's choices.
module packet_fifo
  import iobks_pkg::*;
#(
  parameter int unsigned DEPTH = D_SHARED
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  cell_t                      push_cell,
  input  logic                       pop,
  output cell_t                      head_cell,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  cell_t            mem [DEPTH];
  logic [PTR_W-1:0] rd_ptr, wr_ptr;

  logic do_push, do_pop;

  assign empty   = (count == 0);
  assign full    = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign head_cell = mem[rd_ptr];

  function automatic logic [PTR_W-1:0] next_ptr(input logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= push_cell;
  end

  // A pop is only requested when a cell is there to leave.
  a_no_pop_empty: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);

endmodule
