// tb_diff_converter: every difference from -256 to 255; checks saturation to -128..127, the
// +128 offset and the clip flag.
module tb_diff_converter;
  logic signed [8:0] diff;
  logic [7:0]        comp;
  logic              clipped;
  int checks = 0, failures = 0;

  diff_converter dut (.*);

  initial begin
    for (int d = -256; d <= 255; d++) begin
      int e;
      diff = 9'(d);
      #1;
      e = (d > 127) ? 127 : (d < -128) ? -128 : d;
      checks += 2;
      if (int'(comp) != e + 128) begin failures++; $display("FAIL %0d -> %0d", d, comp); end
      if (clipped != (d > 127 || d < -128)) begin failures++; $display("FAIL clip %0d", d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
