// tb_vector_quantizer: eight linked VAMPIRE chips (256 codewords). Loads a random codebook with
// duplicated codewords in different chips, streams random vectors one per cycle and checks the
// index (lowest global index among equal distortions) and distortion against a full search,
// the three-cycle latency, and that winners in every chip (so disqualification of the others
// over the compare bus) occur.
module tb_vector_quantizer;
  import dvq_pkg::*;
  localparam int NC = 8;
  localparam int CW = 32 * NC;
  logic clk = 0;
  always #5 clk = ~clk;

  logic       rst_n, wr_en, in_valid, out_valid;
  logic [7:0] wr_addr, index;
  vec_t       wr_data, in_vec;
  dist_t      min_dist;
  int checks = 0, failures = 0;

  vector_quantizer #(.NUM_CHIPS(NC)) dut (.*);

  int cb[CW][4];
  int exp_i[$], exp_d[$];
  int wins_in_chip[NC];
  int got = 0, sent = 0, cyc = 0, first_in = -1, first_out = -1;

  function automatic void search(vec_t v, output int bd, output int bi);
    bd = 1 << 20; bi = 0;
    for (int j = 0; j < CW; j++) begin
      int s;
      s = 0;
      for (int c = 0; c < 4; c++) s += (int'(v[c]) > cb[j][c]) ? int'(v[c]) - cb[j][c] : cb[j][c] - int'(v[c]);
      if (s < bd) begin bd = s; bi = j; end
    end
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    rst_n = 0; wr_en = 0; in_valid = 0; wr_addr = 0; wr_data = '0; in_vec = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < CW; j++) begin
      for (int c = 0; c < 4; c++) cb[j][c] = $urandom_range(0, 255);
      if (j >= 32 && j % 9 == 0) for (int c = 0; c < 4; c++) cb[j][c] = cb[j - 32][c];  // ties across chips
    end
    for (int j = 0; j < CW; j++) begin
      wr_en = 1; wr_addr = 8'(j);
      for (int c = 0; c < 4; c++) wr_data[c] = 8'(cb[j][c]);
      @(negedge clk);
    end
    wr_en = 0;
    for (int i = 0; i < 1500; i++) begin
      int bd, bi;
      if (i % 3 == 0) for (int c = 0; c < 4; c++) in_vec[c] = 8'(cb[$urandom_range(0, CW - 1)][c] ^ $urandom_range(0, 3));
      else in_vec = vec_t'($urandom);
      in_valid = 1;
      search(in_vec, bd, bi);
      exp_i.push_back(bi); exp_d.push_back(bd);
      if (first_in < 0) first_in = cyc;
      sent++;
      @(negedge clk);
    end
    in_valid = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (got != sent) begin failures++; $display("FAIL %0d of %0d results", got, sent); end
    checks++;
    if (first_out - first_in != 3) begin failures++; $display("FAIL latency %0d", first_out - first_in); end
    for (int k = 0; k < NC; k++) begin
      checks++;
      if (wins_in_chip[k] == 0) begin failures++; $display("FAIL chip %0d never won", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    int ei, ed;
    if (first_out < 0) first_out = cyc;
    ei = exp_i.pop_front(); ed = exp_d.pop_front();
    checks += 2;
    if (int'(index) != ei) begin failures++; $display("FAIL index %0d exp %0d", index, ei); end
    if (int'(min_dist) != ed) begin failures++; $display("FAIL dist %0d exp %0d", min_dist, ed); end
    wins_in_chip[int'(index) / 32]++;
    got++;
  end
endmodule
