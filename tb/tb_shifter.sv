// tb_shifter: every shift amount with random inputs; input j must appear on
// output (j + shift) mod L with its valid bit.
module tb_shifter;
  import iobks_pkg::*;

  localparam int unsigned L = 4;

  logic [L-1:0] in_valid, out_valid;
  cell_t in_cell [L];
  cell_t out_cell [L];
  logic [1:0] shift;
  int unsigned checks = 0, failures = 0;

  shifter #(.L(L)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 200; r++) begin
      shift    = 2'(r % L);
      in_valid = L'($urandom);
      for (int j = 0; j < L; j++) in_cell[j] = {addr_t'($urandom), {12{$urandom}}};
      #1;
      for (int j = 0; j < L; j++) begin
        int o;
        o = (j + int'(shift)) % L;
        checks++;
        if (out_valid[o] !== in_valid[j] || out_cell[o] !== in_cell[j]) begin
          failures++;
          $display("FAIL shift=%0d input %0d", shift, j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
