// tb_dvq_decoder: encodes 6000 samples with the software DVQ model (line of 40 samples,
// 32 codewords), feeds the index stream to the decoder one index per 4 cycles and checks that
// every decoded sample equals the model's reconstruction, with the 3-cycle latency from index to
// first sample of the tile and both clamps exercised.
module tb_dvq_decoder;
  import dvq_pkg::*;
  import tb_dvq_ref_pkg::*;
  localparam int LINE = 40;
  localparam int N    = 6000;
  localparam int OFS  = 5;     // cycle of the first index
  logic clk = 0;
  always #5 clk = ~clk;

  logic       rst_n, index_valid, recon_valid, overflow, underflow;
  cb_wr_t     cb_wr;
  sample_t    recon;
  logic [4:0] index_in;
  int checks = 0, failures = 0;

  dvq_decoder #(.LINE(LINE)) dut (.*);

  int cb[], pix[], ridx[], rrec[];
  int n_clip = 0, n_ovf = 0, n_unf = 0, h_ovf = 0, h_unf = 0, n_out = 0;

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
        cb[j * 4 + c] = (j == 1) ? 127 : (j == 2) ? -128 : $urandom_range(0, 120) - 60;
    for (int m = 0; m < N; m++) pix[m] = $urandom_range(0, 255);
    dvq_encode(LINE, 32, cb, pix, ridx, rrec, n_clip, n_ovf, n_unf);

    rst_n = 0; index_in = 0; index_valid = 0; cb_wr = '0;
    @(negedge clk);
    for (int j = 0; j < 32; j++) begin
      cb_wr.we = 1; cb_wr.addr = 8'(j);
      for (int c = 0; c < 4; c++) cb_wr.data[c] = 8'(cb[j * 4 + c]);
      @(negedge clk);
    end
    cb_wr = '0;
    for (int t = 0; t < OFS + N + 10; t++) begin
      if (t == 0) rst_n = 1;
      // sample m of the model appears in cycle OFS + m + 3
      if (recon_valid) begin
        int m;
        m = t - OFS - 3;
        chk("recon", int'(recon), (m >= 0 && m < N) ? rrec[m] : -1);
        n_out++;
      end
      h_ovf += overflow; h_unf += underflow;
      index_valid = (t >= OFS) && ((t - OFS) % 4 == 0) && ((t - OFS) / 4 < N / 4);
      index_in    = index_valid ? 5'(ridx[(t - OFS) / 4]) : 5'(0);
      @(negedge clk);
    end
    chk("decoded samples", n_out, N);
    chk("overflow events", h_ovf, n_ovf);
    chk("underflow events", h_unf, n_unf);
    checks++;
    if (n_ovf == 0 || n_unf == 0) begin failures++; $display("FAIL clamps not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
