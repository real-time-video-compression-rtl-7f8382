// tb_inverse_vq: loads 32 random signed codewords, then issues an index every 4 cycles (and a
// few isolated ones) and checks that components 0..3 of that codeword come out on the four
// following cycles, with dhat_valid, and that the index may change once the read is under way.
module tb_inverse_vq;
  import dvq_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic       rst_n, wr_en, start, dhat_valid;
  logic [4:0] wr_addr, index;
  vec_t       wr_data;
  logic [7:0] dhat;
  int checks = 0, failures = 0;
  int cb[32][4];
  int expq[$];

  inverse_vq dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    if (dhat_valid) begin
      int e;
      e = (expq.size() > 0) ? expq.pop_front() : -1;
      checks++;
      if (int'(dhat) != e) begin failures++; $display("FAIL dhat %0d exp %0d", dhat, e); end
    end else if (expq.size() > 0 && !start) begin
      // nothing expected to be pending unless a start was just issued
    end
  end

  initial begin
    rst_n = 0; wr_en = 0; start = 0; wr_addr = 0; wr_data = '0; index = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < 32; j++) begin
      wr_en = 1; wr_addr = 5'(j);
      for (int c = 0; c < 4; c++) begin cb[j][c] = $urandom_range(0, 255); wr_data[c] = 8'(cb[j][c]); end
      @(negedge clk);
    end
    wr_en = 0;
    for (int t = 0; t < 200; t++) begin
      int j;
      j = $urandom_range(0, 31);
      index = 5'(j); start = 1;
      for (int c = 0; c < 4; c++) expq.push_back(cb[j][c]);
      @(negedge clk);
      start = 0;
      repeat (3) @(negedge clk);
      if (t % 50 == 49) repeat (5) @(negedge clk);   // idle gap
    end
    repeat (6) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d outputs missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
