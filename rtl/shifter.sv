// shifter: the L-to-L circular shifter at the entry of a shared buffer.
//
// The concentrator places the k cells it selects on its outputs 0..k-1. The
// shifter rotates them by the shared buffer's write pointer, so that input j
// lands on packet buffer (j + shift) mod L and the L packet buffers are filled
// in a cyclic order across slots. Purely combinational. The rotation is the
// original scheme's; the encoding of the shift amount is this design's choice.
module shifter
  import iobks_pkg::*;
#(
  parameter int unsigned L = L_CONC
) (
  input  logic [L-1:0]                           in_valid,
  input  cell_t                                  in_cell [L],
  input  logic [(L > 1 ? $clog2(L) : 1)-1:0]     shift,
  output logic [L-1:0]                           out_valid,
  output cell_t                                  out_cell [L]
);

  always_comb begin
    for (int unsigned o = 0; o < L; o++) begin
      // Output o takes input (o - shift) mod L.
      logic [(L > 1 ? $clog2(L) : 1)-1:0] src;
      src          = $bits(src)'((o + L - int'(shift)) % L);
      out_valid[o] = in_valid[src];
      out_cell[o]  = in_cell[src];
    end
  end

endmodule
