// shared_buffer: the output queue of a bus interface.
//
// It takes up to L cells per slot from the concentrator's outputs 0..k-1 and
// sends one cell per slot to the output line. A shifter rotates the arriving
// cells by the write pointer so that they go to the L packet buffers in cyclic
// order; the write pointer then advances by the number stored. The output
// side reads the packet buffers in the same cyclic order with its own
// pointer. Together the L FIFOs behave as one first-in first-out queue with
// L inputs, one output and L*D cells of room. This structure is the
// original scheme's.
//
// Cyclic filling keeps the FIFO occupancies within one of each other, so a
// packet buffer can only refuse a cell when the whole queue is full; then
// the remaining cells of the slot are lost and counted in n_drop. The same
// slot's departure frees its place first (this design's choice).
//
// Interface: in_valid/in_cell combinational from the concentrator, stored at
// the clock edge. out_valid/out_cell show the oldest cell; it leaves at the
// edge ending the slot, so a cell leaves at the earliest one slot after it
// arrived. occupancy is the total number of stored cells.
module shared_buffer
  import iobks_pkg::*;
#(
  parameter int unsigned L = L_CONC,
  parameter int unsigned D = D_SHARED
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [L-1:0]                in_valid,
  input  cell_t                       in_cell [L],
  output logic                        out_valid,
  output cell_t                       out_cell,
  output logic [$clog2(L+1)-1:0]      n_drop,
  output logic [$clog2(L*D+1)-1:0]    occupancy
);

  localparam int unsigned PTR_W = (L > 1) ? $clog2(L) : 1;
  localparam int unsigned CW    = $clog2(D+1);

  logic [PTR_W-1:0] wr_ptr, rd_ptr;
  logic [L-1:0]     sh_valid, push, pop, empty, full;
  cell_t            sh_cell  [L];
  cell_t            head     [L];
  logic [CW-1:0]    cnt      [L];
  logic [PTR_W:0]   n_stored;

  shifter #(.L(L)) u_shifter (
    .in_valid, .in_cell, .shift(wr_ptr),
    .out_valid(sh_valid), .out_cell(sh_cell)
  );

  for (genvar f = 0; f < L; f++) begin : g_buf
    packet_fifo #(.DEPTH(D)) u_fifo (
      .clk, .rst_n,
      .push(push[f]), .push_cell(sh_cell[f]),
      .pop(pop[f]),   .head_cell(head[f]),
      .empty(empty[f]), .full(full[f]), .count(cnt[f])
    );
  end

  assign out_valid = !empty[rd_ptr];
  assign out_cell  = head[rd_ptr];

  always_comb begin
    pop = '0;
    if (out_valid) pop[rd_ptr] = 1'b1;
  end

  always_comb begin
    n_stored = '0;
    n_drop   = '0;
    for (int unsigned f = 0; f < L; f++) begin
      push[f] = sh_valid[f] && (!full[f] || pop[f]);
      if (push[f]) n_stored = n_stored + 1'b1;
      if (sh_valid[f] && !push[f]) n_drop = n_drop + 1'b1;
    end
  end

  always_comb begin
    occupancy = '0;
    for (int unsigned f = 0; f < L; f++) occupancy = occupancy + $bits(occupancy)'(cnt[f]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      wr_ptr <= PTR_W'((int'(wr_ptr) + int'(n_stored)) % L);
      if (out_valid) rd_ptr <= PTR_W'((int'(rd_ptr) + 1) % L);
    end
  end

  // The concentrator delivers its cells on outputs 0..k-1 without gaps.
  a_packed_inputs: assert property (@(posedge clk) disable iff (!rst_n)
                                    ((in_valid + 1'b1) & in_valid) == '0);

endmodule
