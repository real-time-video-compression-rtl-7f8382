// tb_delay_fifo: a 16-deep FIFO run as a 7-sample delay line. Random data are written every
// cycle; the output must be the input of seven cycles earlier, zero before that. Also runs a
// second instance at the full depth as a 908-sample line delay.
module tb_delay_fifo;
  logic clk = 0;
  always #5 clk = ~clk;
  logic       rst_n;
  logic [8:0] din, dout, dout_l;
  int checks = 0, failures = 0;
  int hist[$];

  delay_fifo #(.WIDTH(9), .DEPTH(16), .LATENCY(7)) dut (.clk, .rst_n, .din, .dout);
  delay_fifo #(.WIDTH(9), .DEPTH(2048), .LATENCY(908)) dut_l (.clk, .rst_n, .din, .dout(dout_l));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; din = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      int e, el;
      // outputs in cycle t: input of cycle t-7 (t-908)
      e  = (t >= 7)   ? hist[t - 7]   : 0;
      el = (t >= 908) ? hist[t - 908] : 0;
      checks += 2;
      if (int'(dout) != e)    begin failures++; $display("FAIL t=%0d dout %0d exp %0d", t, dout, e); end
      if (int'(dout_l) != el) begin failures++; $display("FAIL t=%0d long %0d exp %0d", t, dout_l, el); end
      din = 9'($urandom);
      hist.push_back(int'(din));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
