// dvq_decoder: DVQ decoder, the reconstruction loop of the encoder on its own. Indices arrive
// from the channel, one per tile (every 4 cycles, without gaps once started); each is latched,
// looked up in the inverse VQ one component per cycle, added to the prediction from the same
// predictor as in the encoder, corrected for overflow/underflow and latched.
// With an errorless channel and the same codebook, its output equals the encoder's
// reconstructed samples.
//
// Timing: index_valid in cycle i gives the four reconstructed samples of that tile in cycles
// i+3 .. i+6 (recon_valid high). The predictor runs with a reconstruction gap of 1 cycle.
// The decoder is drawn in the document as a subset of the encoder; its pipeline is this design's.
module dvq_decoder
  import dvq_pkg::*;
#(
  parameter int unsigned LINE      = SAMPLES_PER_LINE,
  parameter int unsigned CODEWORDS = WORDS_PER_CHIP,
  localparam int unsigned IDX_W    = $clog2(CODEWORDS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  cb_wr_t           cb_wr,
  input  logic [IDX_W-1:0] index_in,
  input  logic             index_valid,
  output sample_t          recon,
  output logic             recon_valid,
  output logic             overflow,
  output logic             underflow
);

  logic [IDX_W-1:0] idx_q;
  logic             start;

  always_ff @(posedge clk)
    if (!rst_n) begin
      idx_q <= '0;
      start <= 1'b0;
    end else begin
      start <= index_valid;
      if (index_valid) idx_q <= index_in;
    end

  logic [7:0] dhat;
  logic       dhat_valid;

  inverse_vq #(.CODEWORDS(CODEWORDS)) u_ivq (
    .clk       (clk),
    .rst_n     (rst_n),
    .wr_en     (cb_wr.we),
    .wr_addr   (cb_wr.addr[IDX_W-1:0]),
    .wr_data   (cb_wr.data),
    .start     (start),
    .index     (idx_q),
    .dhat      (dhat),
    .dhat_valid(dhat_valid)
  );

  sample_t pv, sum_c;
  recon_adder u_add (.pv(pv), .dhat(dhat), .recon(sum_c), .overflow(overflow),
                     .underflow(underflow));

  always_ff @(posedge clk)
    if (!rst_n) begin
      recon       <= '0;
      recon_valid <= 1'b0;
    end else begin
      recon       <= sum_c;
      recon_valid <= dhat_valid;
    end

  predictor #(.LINE(LINE), .RECON_GAP(1)) u_pred (
    .clk(clk), .rst_n(rst_n), .recon(recon), .pv(pv));

endmodule
