// compare_bus: the compare bus shared by linked VAMPIRE chips. Each chip offers the minimum
// distortion it found internally; the bus resolves the overall minimum so that every chip not
// holding it can disqualify itself, and the winner places its address on the address bus.
//
// The physical bus is a set of wired-NOR lines; resolving a minimum on such lines needs a
// most-significant-bit-first elimination, which is what is modelled here (this design's
// reading; the text only says the distortion is put on the bus and compared with the overall
// minimum): for bit 9 down to 0, the line is pulled when some still-competing chip has a 0 in
// that bit, and a chip with a 1 on a pulled line stops competing. Chips with valid low take no
// part. Purely combinational. bus_min is all ones when no chip is valid.
module compare_bus
  import dvq_pkg::*;
#(
  parameter int unsigned NUM_CHIPS = 8
) (
  input  dist_t                chip_min   [NUM_CHIPS],
  input  logic [NUM_CHIPS-1:0] chip_valid,
  output dist_t                bus_min,
  output logic [NUM_CHIPS-1:0] survivors   // chips whose minimum equals bus_min
);

  for (genvar b = DIST_W - 1; b >= 0; b--) begin : g_line
    logic [NUM_CHIPS-1:0] comp_in, comp_out, pull;
    logic                 line;
    if (b == DIST_W - 1) begin : g_top
      assign comp_in = chip_valid;
    end else begin : g_next
      assign comp_in = g_line[b+1].comp_out;
    end
    for (genvar k = 0; k < NUM_CHIPS; k++) begin : g_chip
      assign pull[k]     = comp_in[k] & ~chip_min[k][b];
      assign comp_out[k] = comp_in[k] & ~(chip_min[k][b] & line);
    end
    assign line       = |pull;
    assign bus_min[b] = ~line;
  end

  assign survivors = g_line[0].comp_out;

endmodule
