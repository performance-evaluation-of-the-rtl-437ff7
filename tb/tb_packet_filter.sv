// tb_packet_filter: exhaustive check of one filter. For every address and
// both valid levels, pass must be high only for a valid cell whose address
// equals the filter's own.
module tb_packet_filter;
  import iobks_pkg::*;

  localparam int unsigned MINE = 13;

  logic bus_valid, pass;
  addr_t bus_dest;
  int unsigned checks = 0, failures = 0;

  packet_filter #(.MY_ADDR(MINE)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2; v++) begin
      for (int a = 0; a < (1 << ADDR_W); a++) begin
        bus_valid = v[0];
        bus_dest  = addr_t'(a);
        #1;
        checks++;
        if (pass !== (v == 1 && a == MINE)) begin
          failures++;
          $display("FAIL valid=%0d addr=%0d pass=%0b", v, a, pass);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
