// tb_dvq_encoder: runs the encoder (line of 40 samples, one VAMPIRE chip) on 6000 samples of
// random and smooth video with a codebook that provokes converter saturation and both
// reconstruction clamps. Checks every index and every reconstructed sample against the
// software DVQ model, the 4-sample index rate, the index and reconstruction latencies, that the
// encoding delay stays within 1 us (14 samples at 14.31818 MHz), and that each saturation
// event occurred.
module tb_dvq_encoder;
  import dvq_pkg::*;
  import tb_dvq_ref_pkg::*;
  localparam int LINE = 40;
  localparam int N    = 6000;
  logic clk = 0;
  always #5 clk = ~clk;

  logic       rst_n, index_valid, clip, overflow, underflow;
  cb_wr_t     cb_wr;
  sample_t    pix_in, recon;
  logic [4:0] index;
  int checks = 0, failures = 0;

  dvq_encoder #(.LINE(LINE)) dut (.*);

  int cb[], pix[], ridx[], rrec[];
  int n_clip = 0, n_ovf = 0, n_unf = 0;
  int h_clip = 0, h_ovf = 0, h_unf = 0, n_idx = 0, last_idx_cyc = -1, first_idx_cyc = -1;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    cb = new[32 * 4];
    pix = new[N];
    for (int j = 0; j < 32; j++)
      for (int c = 0; c < 4; c++)
        cb[j * 4 + c] = (j == 0) ? 0 : (j == 1) ? 127 : (j == 2) ? -128 : $urandom_range(0, 120) - 60;
    for (int m = 0; m < N; m++)
      pix[m] = (m / 1000) % 2 == 0 ? $urandom_range(0, 255)
                                   : 128 + 100 * ((m % LINE) / 10 % 2) - 50 + $urandom_range(0, 4);
    dvq_encode(LINE, 32, cb, pix, ridx, rrec, n_clip, n_ovf, n_unf);

    rst_n = 0; pix_in = 0; cb_wr = '0;
    @(negedge clk);
    for (int j = 0; j < 32; j++) begin
      cb_wr.we = 1; cb_wr.addr = 8'(j);
      for (int c = 0; c < 4; c++) cb_wr.data[c] = 8'(cb[j * 4 + c]);
      @(negedge clk);
    end
    cb_wr = '0;
    for (int t = 0; t < N + 12; t++) begin
      if (t == 0) rst_n = 1;
      // outputs during cycle t
      if (index_valid) begin
        // index of tile k leaves in cycle 4k+3+5
        chk("index cycle", (t - 8) % 4, 0);
        if (last_idx_cyc >= 0) chk("index rate", t - last_idx_cyc, 4);
        if (last_idx_cyc < 0) first_idx_cyc = t;
        last_idx_cyc = t;
        if ((t - 8) / 4 < N / 4) chk("index", int'(index), ridx[(t - 8) / 4]);
        n_idx++;
      end
      if (t >= 10 && t - 10 < N) chk("recon", int'(recon), rrec[t - 10]);
      // converter works on sample t-1, the reconstruction adder on sample t-9
      if (t >= 1 && t <= N)    h_clip += clip;
      if (t >= 9 && t < N + 9) begin h_ovf += overflow; h_unf += underflow; end
      pix_in = (t < N) ? 8'(pix[t]) : 8'd0;
      @(negedge clk);
    end
    chk("indices", n_idx, (N + 12 - 8 + 3) / 4);
    // encoding delay: first sample of tile 0 enters in cycle 0; its index must leave within
    // 1 us = 14 sample periods (it is designed to leave in cycle 8)
    chk("first index cycle", first_idx_cyc, 8);
    checks++;
    if (first_idx_cyc > 14) begin failures++; $display("FAIL encoding delay over 1 us"); end
    chk("clip events", h_clip, n_clip);
    chk("overflow events", h_ovf, n_ovf);
    chk("underflow events", h_unf, n_unf);
    checks += 3;
    if (n_clip == 0 || n_ovf == 0 || n_unf == 0) begin
      failures++; $display("FAIL some saturation never happened: %0d %0d %0d", n_clip, n_ovf, n_unf);
    end
    $display("events: clip=%0d overflow=%0d underflow=%0d", h_clip, h_ovf, h_unf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
