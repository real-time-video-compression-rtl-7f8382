// tb_vampire_chip: loads 32 random codewords into one VAMPIRE chip and quantizes random vectors
// (some equal to stored words, some with ties), one per cycle. Checks the minimum distortion and
// the lowest winning address against a direct l1 search, the two-cycle latency, and the chip's
// disqualification when the compare bus shows a smaller overall minimum.
module tb_vampire_chip;
  import dvq_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic       rst_n, wr_en, in_valid, out_valid, win;
  logic [4:0] wr_addr, local_addr;
  vec_t       wr_data, in_vec;
  dist_t      local_min, bus_min;
  int checks = 0, failures = 0;

  vampire_chip dut (.*);

  int cb[32][4];

  function automatic void ref_search(vec_t v, output int bd, output int ba);
    bd = 1 << 20; ba = 0;
    for (int j = 0; j < 32; j++) begin
      int s = 0;
      for (int c = 0; c < 4; c++) begin
        int e = int'(v[c]) - cb[j][c];
        s += (e < 0) ? -e : e;
      end
      if (s < bd) begin bd = s; ba = j; end
    end
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_d[$], exp_a[$];
  int sent = 0, got = 0;
  int lat_cnt;

  initial begin
    rst_n = 0; wr_en = 0; in_valid = 0; wr_addr = 0; wr_data = '0; in_vec = '0; bus_min = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < 32; j++) begin
      for (int c = 0; c < 4; c++) cb[j][c] = (j == 7 || j == 20) ? 100 + c : $urandom_range(0, 255);
      wr_en = 1; wr_addr = 5'(j);
      for (int c = 0; c < 4; c++) wr_data[c] = 8'(cb[j][c]);
      @(negedge clk);
    end
    wr_en = 0;
    // latency: one vector, count cycles to out_valid
    in_vec = {8'd0, 8'd0, 8'd0, 8'd0}; in_valid = 1;
    begin int bd, ba; ref_search(in_vec, bd, ba); exp_d.push_back(bd); exp_a.push_back(ba); end
    @(negedge clk); in_valid = 0; lat_cnt = 1;
    while (!out_valid) begin @(negedge clk); lat_cnt++; end
    checks++;
    if (lat_cnt != 2) begin failures++; $display("FAIL latency %0d", lat_cnt); end
    @(negedge clk);
    // stream of vectors, one per cycle
    for (int i = 0; i < 600; i++) begin
      int bd, ba;
      if (i % 5 == 0) for (int c = 0; c < 4; c++) in_vec[c] = 8'(cb[$urandom_range(0, 31)][c]);
      else if (i % 7 == 0) in_vec = {8'd103, 8'd102, 8'd101, 8'd100};   // tie of words 7 and 20
      else in_vec = vec_t'({$urandom, $urandom});
      in_valid = 1;
      ref_search(in_vec, bd, ba);
      exp_d.push_back(bd); exp_a.push_back(ba);
      @(negedge clk);
    end
    in_valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (got != 601) begin failures++; $display("FAIL got %0d results", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // compare results; bus_min is driven either equal to the chip minimum or one lower
  always @(negedge clk) if (rst_n && out_valid) begin
    int d, a;
    d = (exp_d.size() > 0) ? exp_d.pop_front() : -1;
    a = (exp_a.size() > 0) ? exp_a.pop_front() : -1;
    checks += 3;
    if (int'(local_min) != d) begin failures++; $display("FAIL min %0d exp %0d", local_min, d); end
    if (int'(local_addr) != a) begin failures++; $display("FAIL addr %0d exp %0d", local_addr, a); end
    bus_min = local_min; #1;
    if (!win) begin failures++; $display("FAIL win with equal bus"); end
    if (local_min != 0) begin
      bus_min = local_min - 1; #1;
      checks++;
      if (win) begin failures++; $display("FAIL no disqualification"); end
    end
    got++;
  end
endmodule
