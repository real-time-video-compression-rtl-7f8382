// tb_predictor: feeds a random reconstructed-sample stream to the predictor (line of 40 samples,
// reconstruction gap 10 and 1) and checks every prediction against
// ((R[n-LINE-2] + R[n-LINE+2])/2 + R[n-2*LINE])/2 with integer halving, R before the start = 0.
module tb_predictor;
  import dvq_pkg::*;
  localparam int LINE = 40;
  logic clk = 0;
  always #5 clk = ~clk;
  logic    rst_n;
  sample_t recon, pv, recon1, pv1;
  int checks = 0, failures = 0;
  int in10[$], in1[$];

  predictor #(.LINE(LINE), .RECON_GAP(10)) dut  (.clk, .rst_n, .recon(recon),  .pv(pv));
  predictor #(.LINE(LINE), .RECON_GAP(1))  dut1 (.clk, .rst_n, .recon(recon1), .pv(pv1));

  // R[m] enters in cycle m + gap
  function automatic int r_of(const ref int h[$], input int m, input int gap);
    int c;
    c = m + gap;
    return (m < 0 || c < 0 || c >= h.size()) ? 0 : h[c];
  endfunction

  function automatic int expect_pv(const ref int h[$], input int n, input int gap);
    int a, b, c;
    a = r_of(h, n - 2 * LINE, gap);
    b = r_of(h, n - LINE - 2, gap);
    c = r_of(h, n - LINE + 2, gap);
    return (((b + c) / 2) + a) / 2;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; recon = 0; recon1 = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      // inputs of cycles before 10 (1) stand for samples before the start: keep them 0
      recon  = (t < 10) ? 8'd0 : 8'($urandom);
      recon1 = (t < 1)  ? 8'd0 : 8'($urandom);
      in10.push_back(int'(recon));
      in1.push_back(int'(recon1));
      if (t > 0) begin
        checks += 2;
        if (int'(pv) != expect_pv(in10, t, 10)) begin
          failures++; $display("FAIL t=%0d pv %0d exp %0d", t, pv, expect_pv(in10, t, 10));
        end
        if (int'(pv1) != expect_pv(in1, t, 1)) begin
          failures++; $display("FAIL t=%0d pv1 %0d exp %0d", t, pv1, expect_pv(in1, t, 1));
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
