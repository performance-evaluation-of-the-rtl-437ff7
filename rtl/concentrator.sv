// concentrator: the N-to-L concentrator of a bus interface.
//
// In each time slot up to N inputs request the output (their cells passed the
// packet filters). The concentrator selects at most L of them, places the
// selected cells on its outputs 0..k-1 without gaps (so the shifter behind it
// can fill the packet buffers cyclically) and returns an acknowledgement,
// grant, on the path each winning request came in on. Requests that are not
// selected get no grant; their cells stay at the head of their input buffers.
//
// How the selection is made inside is this design's own: the original scheme gives
// the function of the concentrator but not its insides. Inputs are scanned in
// a rotating order that starts at ptr; a request's output number is the count
// of requests ahead of it in that order, and it wins if that count is below L.
// When requests are rejected, ptr moves to the first rejected input, so the
// same input cannot lose twice in a row and no input starves behind the HOL.
//
// Interface: req/in_cell in, grant/out_valid/out_cell out, all
// combinational within the slot; ptr advances at the clock edge. n_reject
// counts the requests turned away in this slot.
module concentrator
  import iobks_pkg::*;
#(
  parameter int unsigned N = N_PORTS,
  parameter int unsigned L = L_CONC
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [N-1:0]             req,
  input  cell_t                    in_cell  [N],
  output logic [N-1:0]             grant,
  output logic [L-1:0]             out_valid,
  output cell_t                    out_cell [L],
  output logic [$clog2(N+1)-1:0]   n_reject
);

  localparam int unsigned IDX_W = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned CNT_W = $clog2(N+1);

  logic [IDX_W-1:0] ptr;
  logic [CNT_W-1:0] rank      [N];   // requests ahead of input i in scan order
  logic [IDX_W-1:0] first_rej;
  logic             any_rej;

  always_comb begin
    logic [CNT_W-1:0] seen;
    seen      = '0;
    first_rej = ptr;
    any_rej   = 1'b0;
    n_reject  = '0;
    for (int unsigned i = 0; i < N; i++) rank[i] = '0;
    // Scan the inputs starting at ptr.
    for (int unsigned p = 0; p < N; p++) begin
      logic [IDX_W-1:0] idx;
      idx       = IDX_W'((int'(ptr) + p) % N);
      rank[idx] = seen;
      if (req[idx]) begin
        if (seen >= CNT_W'(L)) begin
          n_reject = n_reject + 1'b1;
          if (!any_rej) begin
            any_rej   = 1'b1;
            first_rej = idx;
          end
        end
        seen = seen + 1'b1;
      end
    end
  end

  always_comb begin
    for (int unsigned i = 0; i < N; i++) grant[i] = req[i] && (rank[i] < CNT_W'(L));
  end

  // Output k carries the granted cell whose rank is k (AND-OR selection).
  always_comb begin
    for (int unsigned k = 0; k < L; k++) begin
      out_valid[k] = 1'b0;
      out_cell[k]  = '0;
      for (int unsigned i = 0; i < N; i++) begin
        if (grant[i] && rank[i] == CNT_W'(k)) begin
          out_valid[k] = 1'b1;
          out_cell[k]  = out_cell[k] | in_cell[i];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       ptr <= '0;
    else if (any_rej) ptr <= first_rej;
  end

  a_grant_on_req: assert property (@(posedge clk) disable iff (!rst_n) (grant & ~req) == '0);
  a_at_most_L:    assert property (@(posedge clk) disable iff (!rst_n) $countones(grant) <= L);

endmodule
