// Body shared by the system testbenches. The including module defines the localparams
// NUM_CHIPS, LINE, LINES, FB_DEPTH, VSYNC_RUN, HOLDOFF, HSYNC, BROAD and instantiates
// dvq_system as `dut` on the signals declared here.
//
// Sequence: load a codebook over the host port, reset the pipelines (memories keep their
// contents), then with live synthetic composite video on the A/D: capture a frame and upload it,
// download a different frame, play it (more than one repetition), return to live video, and
// switch the D/A through all three sources. The channel is a loop-back from the encoder to the
// decoder. Afterwards the whole video-bus stream is run through the software DVQ model and every
// encoder index, encoder reconstruction and decoder output is compared with it. Each mechanism
// (converter saturation, both clamps, chip disqualification when there are several chips,
// vertical-sync detection, capture, upload, download, repeated playback, source switching,
// every D/A source) is counted and must occur.

  localparam int FRAME = LINE * LINES;
  localparam int CW    = 32 * NUM_CHIPS;
  localparam int IW    = $clog2(CW);

  logic          clk = 0;
  always #5 clk = ~clk;

  logic          rst_n;
  sample_t       ad_sample, da_sample;
  logic          h2d_valid, h2d_ready, d2h_valid, d2h_ready, busy, frame_start;
  logic [7:0]    h2d_data, d2h_data;
  logic [IW-1:0] enc_index, dec_index;
  logic          enc_index_valid, dec_index_valid;
  dvq_status_t   status;

  // channel: errorless loop-back
  assign dec_index       = enc_index;
  assign dec_index_valid = enc_index_valid;

  int checks = 0, failures = 0;

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 25) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ---------------- synthetic composite video on the A/D ----------------
  // lines of LINE samples, fields of LINES/2 lines; the first 3 lines of a field carry broad
  // (vertical-sync) pulses, the others a horizontal sync; picture: bars, ramp, a 4-sample
  // subcarrier pattern and noise.
  int unsigned vt = 0;
  function automatic int video_at(int unsigned t);
    int line, pos, fl, v;
    line = int'(t / LINE); pos = int'(t % LINE); fl = line % (LINES / 2);
    if (fl < 3) begin
      if (pos < BROAD || (pos >= LINE / 2 && pos < LINE / 2 + BROAD)) return 4 + int'(t % 7);
      return 60;
    end
    if (pos < HSYNC) return 4 + int'(t % 5);
    v = ((pos / 16) % 3 == 0) ? 230 : ((pos / 16) % 3 == 1) ? 40 : 60 + (pos * 3 + line) % 150;
    v += ((pos % 4) < 2) ? 12 : -12;
    v += int'((t * 2654435761) >> 28) % 5;
    return (v > 255) ? 255 : (v < 0) ? 0 : v;
  endfunction

  // ---------------- recording, cycle by cycle after the second reset ----------------
  logic          rec_on = 0;
  int unsigned   cyc = 0;
  int            bus_s[$], enc_rec[$], idx_cyc[$], idx_val[$], dec_cyc[$], dec_val[$];
  int            ad_rec[$];
  int            n_clip = 0, n_ovf = 0, n_unf = 0, n_dovf = 0, n_dunf = 0, n_vsync = 0;
  int            n_disq = 0, n_sof = 0, n_play_cycles = 0, n_live_after_play = 0;
  int            da_mode_seen[3];
  int            first_fs_after = -1;
  logic          cap_armed = 0;
  int            play_start_cyc = -1, play_k = 0, dl_frame[];

  always @(negedge clk) begin
    ad_sample = 8'(video_at(vt));
    vt++;
  end

  always @(posedge clk) if (rec_on) begin
    int bus;
    bus = int'(dut.video_bus);
    bus_s.push_back(bus);
    ad_rec.push_back(int'(ad_sample));
    enc_rec.push_back(int'(dut.enc_recon));
    if (enc_index_valid) begin idx_cyc.push_back(int'(cyc)); idx_val.push_back(int'(enc_index)); end
    if (status.dec_valid) begin dec_cyc.push_back(int'(cyc)); dec_val.push_back(int'(dut.dec_recon)); end
    n_clip += status.enc_clip; n_ovf += status.enc_overflow; n_unf += status.enc_underflow;
    n_dovf += status.dec_overflow; n_dunf += status.dec_underflow; n_vsync += status.vsync;
    n_sof  += status.play_sof;
    if (NUM_CHIPS > 1 && dut.u_enc.u_vq.chip_valid[0] &&
        dut.u_enc.u_vq.chip_win != {NUM_CHIPS{1'b1}}) n_disq++;
    // D/A source
    unique case (dut.dac_sel)
      DAC_ENCODER: begin da_mode_seen[1]++; chk("da=encoder", da_sample, dut.enc_recon); end
      DAC_DECODER: begin da_mode_seen[2]++; chk("da=decoder", da_sample, dut.dec_recon); end
      default:     begin da_mode_seen[0]++; chk("da=video", da_sample, dut.video_bus); end
    endcase
    // playback must show the downloaded frame in order, repeated
    if (dut.fb_play && dut.play_valid) begin
      if (dl_frame.size() == FRAME) chk("playback sample", bus, dl_frame[play_k % FRAME]);
      play_k++;
      n_play_cycles++;
    end else if (play_k > 0) begin
      n_live_after_play++;
      chk("live video after play", bus, int'(ad_sample));
    end
    if (cap_armed && frame_start && first_fs_after < 0) first_fs_after = int'(cyc);
    cyc++;
  end

  // ---------------- host port ----------------
  task automatic send(input logic [7:0] b);
    while (!h2d_ready) @(negedge clk);
    h2d_valid = 1; h2d_data = b;
    @(negedge clk);
    h2d_valid = 0;
  endtask

  task automatic wait_idle();
    @(negedge clk);
    while (busy) @(negedge clk);
  endtask

  // ---------------- the run ----------------
  int cbv[];
  longint wd_limit;

  initial begin
    wd_limit = 64'(FRAME) * 14 + 200000;
    repeat (wd_limit) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k, cap_start;
    rst_n = 0; h2d_valid = 0; h2d_data = 0; d2h_ready = 0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    // codebook: signed differences, several large ones so that both clamps occur
    cbv = new[CW * 4];
    for (int j = 0; j < CW; j++)
      for (int c = 0; c < 4; c++)
        cbv[j * 4 + c] = (j == 0) ? 0 : (j == 1) ? 120 : (j == 2) ? -120 :
                         int'($urandom_range(0, 160)) - 80;
    send(CMD_LOAD_CB);
    for (int i = 0; i < CW * 4; i++) send(8'(cbv[i]));
    wait_idle();
    // second reset: pipelines restart, memories keep the codebook
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1; rec_on = 1;
    send(CMD_OUTSEL); send(8'(DAC_ENCODER));
    // capture a live frame
    send(CMD_CAPTURE);
    cap_armed = 1;
    wait_idle();
    cap_armed = 0;
    chk("capture saw a frame start", first_fs_after >= 0, 1);
    // upload it; the first stored sample is the A/D sample of the frame_start cycle
    send(CMD_OUTSEL); send(8'(DAC_DECODER));
    send(CMD_UPLOAD);
    k = 0;
    cap_start = first_fs_after;
    while (k < FRAME) begin
      d2h_ready = 1;
      @(negedge clk);
      #1;
      if (d2h_valid) begin
        @(posedge clk);
        chk("uploaded sample", d2h_data, ad_rec[cap_start + k]);
        k++;
        @(negedge clk);
      end
    end
    d2h_ready = 0;
    wait_idle();
    // download a different frame
    dl_frame = new[FRAME];
    for (int i = 0; i < FRAME; i++) dl_frame[i] = (i * 5 + (i / LINE) * 17) % 256;
    send(CMD_DOWNLOAD);
    for (int i = 0; i < FRAME; i++) send(8'(dl_frame[i]));
    wait_idle();
    // play a little more than one frame, then back to live video
    send(CMD_OUTSEL); send(8'(DAC_VIDEO));
    send(CMD_PLAY);
    repeat (FRAME + 3 * LINE) @(negedge clk);
    send(CMD_OUTSEL); send(8'(DAC_ENCODER));
    send(CMD_LIVE);
    repeat (3 * LINE) @(negedge clk);
    rec_on = 0;
    @(negedge clk);
    check_against_model();
    // every mechanism must have occurred
    chk("converter saturation occurred", n_clip > 0, 1);
    chk("encoder overflow occurred", n_ovf > 0, 1);
    chk("encoder underflow occurred", n_unf > 0, 1);
    chk("decoder overflow occurred", n_dovf > 0, 1);
    chk("decoder underflow occurred", n_dunf > 0, 1);
    chk("vertical syncs detected", n_vsync >= 2, 1);
    chk("playback repeated", n_sof >= 2, 1);
    chk("live after playback", n_live_after_play > 0, 1);
    for (int m = 0; m < 3; m++) chk($sformatf("D/A source %0d used", m), da_mode_seen[m] > 0, 1);
    if (NUM_CHIPS > 1) chk("chip disqualification occurred", n_disq > 0, 1);
    $display("events: clip=%0d ovf=%0d unf=%0d dec_ovf=%0d dec_unf=%0d vsync=%0d sof=%0d disq=%0d cycles=%0d",
             n_clip, n_ovf, n_unf, n_dovf, n_dunf, n_vsync, n_sof, n_disq, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // software model over the recorded video bus: indices in cycle 4k+8, encoder reconstruction
  // of sample m in cycle m+10, decoder output of sample m in cycle m+11 (loop-back channel)
  task automatic check_against_model();
    int pix[], ridx[], rrec[];
    int mc = 0, mo = 0, mu = 0, n;
    n = bus_s.size() / 4 * 4;
    pix = new[n];
    for (int i = 0; i < n; i++) pix[i] = bus_s[i];
    tb_dvq_ref_pkg::dvq_encode(LINE, CW, cbv, pix, ridx, rrec, mc, mo, mu);
    chk("index count", idx_cyc.size(), (bus_s.size() - 9) / 4 + 1);
    for (int i = 0; i < idx_cyc.size(); i++) begin
      chk("index cycle", idx_cyc[i], 4 * i + 8);
      if (i < n / 4) chk("index", idx_val[i], ridx[i]);
    end
    for (int t = 10; t < n; t++) chk("encoder reconstruction", enc_rec[t], rrec[t - 10]);
    for (int i = 0; i < dec_cyc.size(); i++) begin
      int m;
      m = dec_cyc[i] - 11;
      if (m >= 0 && m < n) chk("decoder output", dec_val[i], rrec[m]);
      else chk("decoder output in range", 0, 1);
    end
    chk("decoder output count", dec_cyc.size() >= n - 16, 1);
  endtask
