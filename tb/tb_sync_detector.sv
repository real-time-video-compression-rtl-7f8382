// tb_sync_detector: synthetic composite video with lines of 100 samples: a 7-sample horizontal
// sync at the start of each line, and every 30 lines a vertical-sync interval of three lines
// with 40-sample broad pulses. With VSYNC_RUN 20 and a hold-off of 5 lines, checks that one
// vsync is reported per field at the first broad pulse (never on horizontal syncs), that
// frame_start marks every second field, and that field alternates.
module tb_sync_detector;
  import dvq_pkg::*;
  localparam int L = 100, FIELD_LINES = 30;
  logic clk = 0;
  always #5 clk = ~clk;
  logic    rst_n, vsync, frame_start, field;
  sample_t sample;
  int checks = 0, failures = 0;

  sync_detector #(.SYNC_LEVEL(8'd32), .VSYNC_RUN(20), .HOLDOFF(5 * L)) dut (.*);

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_v, n_f, prev_field;
    rst_n = 0; sample = 60;
    repeat (3) @(negedge clk);
    rst_n = 1;
    n_v = 0; n_f = 0;
    for (int t = 0; t < 8 * FIELD_LINES * L + 5; t++) begin
      int line, pos, fl;
      bit sync_lvl;
      // outputs refer to the sample of the previous cycle
      if (vsync) begin
        int pt;
        pt = t - 1;
        n_v++;
        // expected: 20th sample of the first broad pulse of a field
        chk("vsync position", (pt % (FIELD_LINES * L)), 19);
        chk("frame_start on alternate fields", frame_start, (n_v % 2 == 1) ? 1 : 0);
        if (frame_start) n_f++;
      end else chk("no frame_start", frame_start, 0);
      line = t / L; pos = t % L; fl = line % FIELD_LINES;
      if (fl < 3) sync_lvl = (pos < 40) || (pos >= 50 && pos < 90);   // broad pulses
      else        sync_lvl = pos < 7;                                 // horizontal sync
      sample = sync_lvl ? 8'($urandom_range(0, 20)) : 8'($urandom_range(40, 255));
      @(negedge clk);
    end
    chk("fields", n_v, 8);
    chk("frames", n_f, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
