// tb_controller: the controller with a small frame buffer (frames of 30 samples) behind it,
// driven through the host byte stream. Checks D/A source selection, codebook loading (address
// and data of all 32 codeword writes), frame download followed by upload under random
// backpressure, play/live switching, and capture of a frame from the A/D after frame_start
// (read back by upload), with busy high for each long command.
module tb_controller;
  import dvq_pkg::*;
  localparam int FR = 30;
  logic clk = 0;
  always #5 clk = ~clk;

  logic       rst_n, h2d_valid, h2d_ready, d2h_valid, d2h_ready, busy;
  logic [7:0] h2d_data, d2h_data;
  logic       fb_capture_req, fb_capture_done, fb_capture_busy, fb_host_clr, fb_host_we;
  logic       fb_host_re, fb_host_rvalid, fb_play, play_valid, play_sof;
  sample_t    fb_host_wdata, fb_host_rdata, play_data, ad_sample;
  logic       frame_start;
  dac_sel_e   dac_sel;
  cb_wr_t     cb_wr;
  int checks = 0, failures = 0;

  controller #(.FRAME_SAMPLES(FR), .CODEWORDS(32)) dut (.*);

  frame_buffer #(.DEPTH(32), .FRAME_SAMPLES(FR)) u_fb (
    .clk, .rst_n, .ad_sample, .frame_start, .capture_req(fb_capture_req),
    .capture_busy(fb_capture_busy), .capture_done(fb_capture_done), .host_clr(fb_host_clr),
    .host_we(fb_host_we), .host_wdata(fb_host_wdata), .host_re(fb_host_re),
    .host_rdata(fb_host_rdata), .host_rvalid(fb_host_rvalid), .play(fb_play),
    .play_data, .play_valid, .play_sof);

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic send(input logic [7:0] b);
    while (!h2d_ready) @(negedge clk);
    h2d_valid = 1; h2d_data = b;
    @(negedge clk);
    h2d_valid = 0;
  endtask

  task automatic receive_frame(input int exp[FR]);
    int k;
    k = 0;
    while (k < FR) begin
      d2h_ready = ($urandom_range(0, 2) != 0);
      #1;
      if (d2h_valid && d2h_ready) begin
        chk($sformatf("upload byte %0d", k), int'(d2h_data), exp[k]);
        k++;
      end
      @(negedge clk);
    end
    d2h_ready = 0;
  endtask

  // codebook write monitor
  int cb_exp[32][4];
  int cb_seen = 0;
  always @(negedge clk) if (rst_n && cb_wr.we) begin
    chk("cb addr", int'(cb_wr.addr), cb_seen);
    for (int c = 0; c < 4; c++) chk("cb data", int'(cb_wr.data[c]), cb_exp[cb_seen][c]);
    cb_seen++;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fr[FR];
    rst_n = 0; h2d_valid = 0; h2d_data = 0; d2h_ready = 0; ad_sample = 0; frame_start = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk("dac_sel reset", int'(dac_sel), int'(DAC_VIDEO));
    send(CMD_OUTSEL); send(8'd1); @(negedge clk);
    chk("dac_sel encoder", int'(dac_sel), int'(DAC_ENCODER));
    send(CMD_OUTSEL); send(8'd2); @(negedge clk);
    chk("dac_sel decoder", int'(dac_sel), int'(DAC_DECODER));
    // codebook
    for (int j = 0; j < 32; j++) for (int c = 0; c < 4; c++) cb_exp[j][c] = $urandom_range(0, 255);
    send(CMD_LOAD_CB);
    for (int j = 0; j < 32; j++) for (int c = 0; c < 4; c++) send(8'(cb_exp[j][c]));
    @(negedge clk);
    chk("codewords written", cb_seen, 32);
    chk("idle after codebook", busy, 0);
    // download, then upload
    for (int i = 0; i < FR; i++) fr[i] = $urandom_range(0, 255);
    send(CMD_DOWNLOAD);
    chk("busy in download", busy, 1);
    for (int i = 0; i < FR; i++) send(8'(fr[i]));
    @(negedge clk);
    chk("idle after download", busy, 0);
    send(CMD_UPLOAD);
    receive_frame(fr);
    @(negedge clk);
    chk("idle after upload", busy, 0);
    // play / live
    send(CMD_PLAY); @(negedge clk);
    chk("play", fb_play, 1);
    repeat (40) @(negedge clk);
    send(CMD_LIVE); @(negedge clk);
    chk("live", fb_play, 0);
    // capture: frame_start comes 12 cycles after the command
    send(CMD_PLAY);
    send(CMD_CAPTURE); @(negedge clk);
    chk("capture leaves play", fb_play, 0);
    chk("busy in capture", busy, 1);
    for (int t = 0; t < 60; t++) begin
      ad_sample = 8'(200 - t);
      frame_start = (t == 12);
      @(negedge clk);
    end
    frame_start = 0;
    chk("idle after capture", busy, 0);
    for (int i = 0; i < FR; i++) fr[i] = 200 - 12 - i;
    send(CMD_UPLOAD);
    receive_frame(fr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
