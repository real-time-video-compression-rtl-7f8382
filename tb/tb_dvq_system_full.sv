// tb_dvq_system_full: the same end-to-end sequence as tb_dvq_system with the system at its
// default size: one VAMPIRE chip (32 codewords), 910-sample lines, 526-line frames, a 512K
// frame buffer and the default sync detector (200-sample vertical-sync run). The synthetic
// video has 67-sample horizontal syncs and 380-sample broad pulses. One complete pass:
// codebook load, capture and upload of a live frame, download and repeated playback of
// another, and live coding, all checked against the software model.
module tb_dvq_system_full;
  import dvq_pkg::*;
  localparam int NUM_CHIPS = 1;
  localparam int LINE      = SAMPLES_PER_LINE;
  localparam int LINES     = LINES_PER_FRAME;
  localparam int FB_DEPTH  = 524288;
  localparam int VSYNC_RUN = 200;
  localparam int HOLDOFF   = 8 * SAMPLES_PER_LINE;
  localparam int HSYNC     = 67;
  localparam int BROAD     = 380;

  `include "tb_dvq_system_body.svh"

  dvq_system dut (.*);
endmodule
