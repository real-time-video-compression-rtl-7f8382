// recon_adder: reconstruction adder with overflow/underflow correction. Adds the delayed
// predicted value (0..255) and the decoded difference component (signed, -128..127) and
// clamps the result to the 8-bit sample range; `overflow` and `underflow` flag a clamped sum.
// Combinational; the latch after it is in the encoder/decoder. The adder and the correction
// block follow the encoder diagram; clamping as the correction is this design's reading.
module recon_adder
  import dvq_pkg::*;
(
  input  sample_t    pv,
  input  logic [7:0] dhat,      // two's complement difference
  output sample_t    recon,
  output logic       overflow,
  output logic       underflow
);

  logic signed [9:0] sum;
  assign sum = $signed({2'b00, pv}) + $signed({{2{dhat[7]}}, dhat});

  always_comb begin
    overflow  = sum > 10'sd255;
    underflow = sum < 10'sd0;
    if (overflow)       recon = 8'hFF;
    else if (underflow) recon = 8'h00;
    else                recon = sum[7:0];
  end

endmodule
