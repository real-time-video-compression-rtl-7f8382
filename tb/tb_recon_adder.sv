// tb_recon_adder: all 256 x 256 combinations of prediction and signed difference; checks the
// clamped sum and the overflow/underflow flags.
module tb_recon_adder;
  logic [7:0] pv, dhat, recon;
  logic       overflow, underflow;
  int checks = 0, failures = 0;

  recon_adder dut (.*);

  initial begin
    for (int p = 0; p < 256; p++)
      for (int d = -128; d < 128; d++) begin
        int s, e;
        pv = 8'(p); dhat = 8'(d);
        #1;
        s = p + d;
        e = (s > 255) ? 255 : (s < 0) ? 0 : s;
        checks += 3;
        if (int'(recon) != e) begin failures++; $display("FAIL %0d+%0d -> %0d", p, d, recon); end
        if (overflow != (s > 255)) failures++;
        if (underflow != (s < 0)) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
