// tb_compare_bus: random chip minima (with forced ties and chips switched off) on an 8-chip
// compare bus; checks the resolved minimum and the set of surviving chips against a direct
// minimum over the valid chips.
module tb_compare_bus;
  import dvq_pkg::*;
  localparam int N = 8;
  dist_t        chip_min [N];
  logic [N-1:0] chip_valid, survivors;
  dist_t        bus_min;
  int checks = 0, failures = 0;

  compare_bus #(.NUM_CHIPS(N)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mn;
    logic [N-1:0] es;
    for (int it = 0; it < 3000; it++) begin
      for (int k = 0; k < N; k++) chip_min[k] = dist_t'($urandom_range(0, 1023));
      if (it % 3 == 0) chip_min[$urandom_range(0, N-1)] = chip_min[$urandom_range(0, N-1)];
      if (it % 5 == 0) for (int k = 0; k < N; k++) chip_min[k] = dist_t'($urandom_range(0, 3));
      chip_valid = (it % 4 == 0) ? N'($urandom) : '1;
      #1;
      mn = 1023;
      for (int k = 0; k < N; k++) if (chip_valid[k] && chip_min[k] < mn) mn = chip_min[k];
      es = '0;
      for (int k = 0; k < N; k++) es[k] = chip_valid[k] && (int'(chip_min[k]) == mn);
      checks += 2;
      if (int'(bus_min) != mn) begin failures++; $display("FAIL bus_min %0d exp %0d", bus_min, mn); end
      if (chip_valid != 0 && survivors != es) begin
        failures++; $display("FAIL survivors %b exp %b", survivors, es);
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
