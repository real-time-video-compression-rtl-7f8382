// tb_vampire_cell: drives one VAMPIRE computation cell with random stored bits, input bits,
// carries and compare-bus values, and checks every output against the arithmetic it stands
// for (1-bit compare, subtract with borrow, add with carry, compare-bus elimination).
module tb_vampire_cell;
  logic clk = 0;
  always #5 clk = ~clk;

  logic       word;
  logic [3:0] wbits, xbits, gt_in, gt_out, gt, cin_diff, cout_diff;
  logic       cin_sum01, cout_sum01, cin_sum23, cout_sum23, cin_final, cout_final;
  logic       prop_in, prop_out, cmp_drive, cmp_line;
  int checks = 0, failures = 0;

  vampire_cell dut (.*);

  task automatic check(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] y;
    word = 0; wbits = 0; xbits = 0; gt_in = 0; gt = 0; cin_diff = 0;
    cin_sum01 = 0; cin_sum23 = 0; cin_final = 0; prop_in = 0; cmp_line = 0;
    for (int it = 0; it < 2000; it++) begin
      // write a new stored value every few iterations
      if (it % 4 == 0) begin
        @(negedge clk);
        y = 4'($urandom);
        wbits = y; word = 1;
        @(negedge clk);
        word = 0; wbits = 4'($urandom);   // must not be written
      end
      xbits = 4'($urandom); gt_in = 4'($urandom); gt = 4'($urandom); cin_diff = 4'($urandom);
      {cin_sum01, cin_sum23, cin_final, prop_in, cmp_line} = 5'($urandom);
      #1;
      begin
        int ad[4];
        int s01, s23, sf;
        for (int c = 0; c < 4; c++) begin
          int x, yy, a, b, d;
          x = xbits[c]; yy = y[c];
          check("gt_out", gt_out[c], (2 * x + gt_in[c]) > (2 * yy) ? 1 : 0);
          a = gt[c] ? x : yy;
          b = gt[c] ? yy : x;
          d = a - b - cin_diff[c];
          ad[c] = d & 1;
          check("cout_diff", cout_diff[c], d < 0 ? 1 : 0);
        end
        s01 = ad[0] + ad[1] + cin_sum01;
        s23 = ad[2] + ad[3] + cin_sum23;
        sf  = (s01 & 1) + (s23 & 1) + cin_final;
        check("cout_sum01", cout_sum01, s01 / 2);
        check("cout_sum23", cout_sum23, s23 / 2);
        check("cout_final", cout_final, sf / 2);
        // compare bus: drive when qualified with a 0 bit; drop out on a 1 bit when line pulled
        check("cmp_drive", cmp_drive, (prop_in && (sf & 1) == 0) ? 1 : 0);
        check("prop_out", prop_out, (prop_in && !((sf & 1) == 1 && cmp_line)) ? 1 : 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
