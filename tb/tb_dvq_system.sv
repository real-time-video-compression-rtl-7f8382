// tb_dvq_system: end-to-end test of the DVQ system at reduced size: eight linked VAMPIRE chips
// (256 codewords, the largest configuration of the chip set), lines of 40 samples, frames of
// 12 lines, a 512-location frame buffer and sync thresholds scaled to the short lines. See tb_dvq_system_body.svh for the sequence and checks.
module tb_dvq_system;
  import dvq_pkg::*;
  localparam int NUM_CHIPS = 8;
  localparam int LINE      = 40;
  localparam int LINES     = 12;
  localparam int FB_DEPTH  = 512;
  localparam int VSYNC_RUN = 12;
  localparam int HOLDOFF   = 4 * LINE;
  localparam int HSYNC     = 3;
  localparam int BROAD     = 17;

  `include "tb_dvq_system_body.svh"

  dvq_system #(.NUM_CHIPS(NUM_CHIPS), .LINE(LINE), .LINES(LINES), .FB_DEPTH(FB_DEPTH),
               .VSYNC_RUN(VSYNC_RUN), .HOLDOFF(HOLDOFF)) dut (.*);
endmodule
