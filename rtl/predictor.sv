// predictor: predicts each composite-video sample from reconstructed samples of the two
// previous lines of the same field, using only samples of the same colour-subcarrier phase.
// At 4 fsc sampling a line has LINE = 910 samples, so the line above is 180 degrees out of
// phase at the same position but in phase two samples to either side, and the line two above is
// in phase at the same position. With R[n] the reconstructed sample stream:
//     A = R[n - 2*LINE], B = R[n - LINE - 2], C = R[n - LINE + 2]
//     pv[n] = ((B + C)/2 + A)/2      (each /2 drops the LSB of a 9-bit sum)
// Three delay FIFOs in a chain give C, B and A: the first delays the reconstructed stream until it
// lines up with C, the second adds 4 samples (B), the third one line less 2 samples (A).
//
// Timing: recon carries R[m] in cycle m + RECON_GAP relative to the cycle in which pv[m] must be
// on the output (registered). The encoder has RECON_GAP = 10 (its reconstruction latency), the
// decoder 1. Requires LINE - 3 - RECON_GAP >= 2. The formula, the FIFO chain and the LSB-drop
// halving follow the document; the latency bookkeeping is this design's.
module predictor
  import dvq_pkg::*;
#(
  parameter int unsigned LINE      = SAMPLES_PER_LINE,
  parameter int unsigned RECON_GAP = 10,
  parameter int unsigned FIFO_DEPTH = 2048
) (
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t recon,
  output sample_t pv
);

  sample_t c_s, b_s, a_s;

  delay_fifo #(.WIDTH(SAMPLE_W), .DEPTH(FIFO_DEPTH), .LATENCY(LINE - 3 - RECON_GAP)) u_fifo_c (
    .clk(clk), .rst_n(rst_n), .din(recon), .dout(c_s));
  delay_fifo #(.WIDTH(SAMPLE_W), .DEPTH(FIFO_DEPTH), .LATENCY(4)) u_fifo_b (
    .clk(clk), .rst_n(rst_n), .din(c_s), .dout(b_s));
  delay_fifo #(.WIDTH(SAMPLE_W), .DEPTH(FIFO_DEPTH), .LATENCY(LINE - 2)) u_fifo_a (
    .clk(clk), .rst_n(rst_n), .din(b_s), .dout(a_s));

  logic [8:0] sum_bc, sum_a;
  assign sum_bc = {1'b0, b_s} + {1'b0, c_s};
  assign sum_a  = {1'b0, sum_bc[8:1]} + {1'b0, a_s};

  always_ff @(posedge clk)
    if (!rst_n) pv <= '0;
    else        pv <= sum_a[8:1];

endmodule
