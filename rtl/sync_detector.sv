// sync_detector: the synchronization circuitry beside the frame buffer. It watches the sampled
// composite video and marks where a frame starts, so the frame buffer knows where to begin and
// end a stored frame.
//
// Method (this design's own; the document gives only the purpose): a sample at or below
// SYNC_LEVEL is at sync-tip level. Horizontal sync pulses last about 4.7 us (67 samples at
// 4 fsc), the broad pulses of the vertical-sync interval about 27 us (388 samples). A run of
// VSYNC_RUN consecutive sync-level samples therefore marks a vertical sync; later runs within
// HOLDOFF samples (the other broad pulses of the same interval) are ignored. Each detection
// starts a field (vsync pulse); every second field starts a frame (frame_start), on the sample
// where the run reached VSYNC_RUN. The first field seen after reset starts a frame.
// One sample per clock; outputs are registered with the sample they refer to (one cycle late).
module sync_detector
  import dvq_pkg::*;
#(
  parameter logic [7:0]  SYNC_LEVEL = 8'd32,
  parameter int unsigned VSYNC_RUN  = 200,
  parameter int unsigned HOLDOFF    = 8 * SAMPLES_PER_LINE
) (
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t sample,
  output logic    vsync,        // a field starts
  output logic    frame_start,  // a frame starts (every second field)
  output logic    field         // 0: first field of the frame, 1: second
);

  localparam int unsigned RW = $clog2(VSYNC_RUN + 1);
  localparam int unsigned HW = $clog2(HOLDOFF + 1);

  logic [RW-1:0] run;
  logic [HW-1:0] hold;
  logic          detect;

  assign detect = (sample <= SYNC_LEVEL) && (run == RW'(VSYNC_RUN - 1)) && (hold == '0);

  always_ff @(posedge clk)
    if (!rst_n) begin
      run         <= '0;
      hold        <= '0;
      vsync       <= 1'b0;
      frame_start <= 1'b0;
      field       <= 1'b1;
    end else begin
      if (sample > SYNC_LEVEL)             run <= '0;
      else if (run != RW'(VSYNC_RUN))      run <= run + 1'b1;
      if (detect)                          hold <= HW'(HOLDOFF);
      else if (hold != '0)                 hold <= hold - 1'b1;
      vsync       <= detect;
      frame_start <= detect && field;
      if (detect) field <= ~field;
    end

endmodule
