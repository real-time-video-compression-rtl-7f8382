// diff_converter: the 9-bit to 8-bit converter between the subtractor and the vector
// quantizer. The difference pixel - prediction lies in -255..255; the VAMPIRE chip compares
// unsigned 8-bit components. The converter saturates the difference to -128..127 and adds 128
// (offset binary), so that l1 distances between converted values equal those between the
// signed differences. `clipped` flags a saturated difference. Combinational.
// The document only names the converter; saturation and offset binary are this design's choice.
module diff_converter
  import dvq_pkg::*;
(
  input  logic signed [8:0] diff,
  output sample_t           comp,
  output logic              clipped
);

  always_comb begin
    clipped = 1'b0;
    if (diff > 9'sd127) begin
      comp    = 8'hFF;
      clipped = 1'b1;
    end else if (diff < -9'sd128) begin
      comp    = 8'h00;
      clipped = 1'b1;
    end else begin
      comp = diff[7:0] ^ 8'h80;
    end
  end

endmodule
