// tb_frame_buffer: a 64-location frame buffer holding frames of 50 samples. Writes a frame over
// the host port and reads it back; plays it three times and checks the repeated sequence and
// the start-of-frame marks; captures a frame from a counting A/D stream after a frame_start
// and checks that the stored frame begins at that sample and holds exactly 50 samples.
module tb_frame_buffer;
  import dvq_pkg::*;
  localparam int FR = 50;
  logic clk = 0;
  always #5 clk = ~clk;

  logic    rst_n, frame_start, capture_req, capture_busy, capture_done;
  logic    host_clr, host_we, host_re, host_rvalid, play, play_valid, play_sof;
  sample_t ad_sample, host_wdata, host_rdata, play_data;
  int checks = 0, failures = 0;
  int frame[FR];

  frame_buffer #(.DEPTH(64), .FRAME_SAMPLES(FR)) dut (.*);

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic host_read_frame(int base);
    host_clr = 1; @(negedge clk); host_clr = 0;
    for (int i = 0; i < FR; i++) begin
      host_re = 1; @(negedge clk); host_re = 0;
      chk("host_rvalid", host_rvalid, 1);
      chk("host_rdata", int'(host_rdata), (base + i) & 255);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sof_cnt, k, cap_start;
    rst_n = 0; frame_start = 0; capture_req = 0; host_clr = 0; host_we = 0; host_re = 0;
    play = 0; ad_sample = 0; host_wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // host write then read
    host_clr = 1; @(negedge clk); host_clr = 0;
    for (int i = 0; i < FR; i++) begin
      host_we = 1; host_wdata = 8'(100 + i); @(negedge clk);
    end
    host_we = 0;
    host_read_frame(100);
    // playback, repeated three times
    play = 1;
    k = 0; sof_cnt = 0;
    while (k < 3 * FR) begin
      @(negedge clk);
      if (play_valid) begin
        chk("play_data", int'(play_data), 100 + (k % FR));
        if (play_sof) begin sof_cnt++; chk("sof position", k % FR, 0); end
        k++;
      end
    end
    chk("sof count", sof_cnt, 3);
    play = 0;
    @(negedge clk);
    // capture: A/D counts up; frame_start comes with sample 7 of the count
    capture_req = 1; @(negedge clk); capture_req = 0;
    chk("capture_busy", capture_busy, 1);
    cap_start = 7;
    for (int t = 0; t < 80; t++) begin
      ad_sample = 8'(t);
      frame_start = (t == cap_start) || (t == cap_start + 20);   // a second one must not restart
      @(negedge clk);
      if (t == cap_start + FR - 1) chk("capture_done", capture_done, 1);
    end
    frame_start = 0;
    chk("capture_busy after", capture_busy, 0);
    host_read_frame(cap_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
