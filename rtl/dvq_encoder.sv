// dvq_encoder: real-time differential vector quantization (DVQ) encoder for sampled composite
// video, one sample per clock (14.31818 MHz in the original system), no buffering.
//
// Data path, as in the encoder block diagram:
//   pixel - predicted value -> 9-bit difference latch -> 9-to-8-bit converter ->
//   three difference-tile latches (components 0..2, each loaded in its own sample slot) plus the
//   direct path (component 3) -> vector quantizer -> index latch -> index out (to the channel)
//   index -> inverse VQ (four RAMs, one component per cycle) -> + delayed predicted value ->
//   overflow/underflow correction -> latch -> reconstructed sample -> predictor FIFOs.
// A tile is four consecutive samples; the tile phase counts from reset.
//
// Timing: if the last sample of a tile enters in cycle n, its index leaves (index_valid) in
// cycle n+5 and the reconstructed samples of that tile leave in cycles n+7 .. n+10, i.e. each
// reconstructed sample appears ENC_LAT = 10 cycles after the sample entered. The predicted value
// is delayed ENC_LAT-1 cycles by a FIFO to meet its decoded difference. One index per 4 cycles.
// Flags clip/overflow/underflow pulse when the converter or the correction saturate.
// Codebook writes (cb_wr) carry the signed difference codeword; the vector quantizer receives it
// in offset binary and the inverse VQ as is. Pipeline register placement is this design's.
module dvq_encoder
  import dvq_pkg::*;
#(
  parameter int unsigned LINE      = SAMPLES_PER_LINE,
  parameter int unsigned NUM_CHIPS = 1,
  localparam int unsigned IDX_W    = $clog2(WORDS_PER_CHIP * NUM_CHIPS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  cb_wr_t           cb_wr,
  input  sample_t          pix_in,
  output logic [IDX_W-1:0] index,
  output logic             index_valid,
  output sample_t          recon,
  output logic             clip,
  output logic             overflow,
  output logic             underflow
);

  localparam int unsigned ENC_LAT = 10;

  sample_t pv, pv_d;

  // ---- subtractor and difference latch ----
  logic signed [8:0] diff_q;
  logic [1:0]        phase, diff_phase;
  logic              diff_valid;

  always_ff @(posedge clk)
    if (!rst_n) begin
      phase      <= '0;
      diff_q     <= '0;
      diff_phase <= '0;
      diff_valid <= 1'b0;
    end else begin
      phase      <= phase + 2'd1;
      diff_q     <= $signed({1'b0, pix_in}) - $signed({1'b0, pv});
      diff_phase <= phase;
      diff_valid <= 1'b1;
    end

  // ---- 9-bit to 8-bit converter and difference tile ----
  sample_t conv;
  diff_converter u_conv (.diff(diff_q), .comp(conv), .clipped(clip));

  sample_t lat0, lat1, lat2;
  always_ff @(posedge clk) begin
    if (diff_phase == 2'd0) lat0 <= conv;
    if (diff_phase == 2'd1) lat1 <= conv;
    if (diff_phase == 2'd2) lat2 <= conv;
  end

  vec_t tile;
  assign tile = {conv, lat2, lat1, lat0};

  // ---- vector quantizer ----
  vec_t cb_offset;
  always_comb
    for (int c = 0; c < VEC_DIM; c++) cb_offset[c] = cb_wr.data[c] ^ 8'h80;

  logic             vq_valid;
  logic [IDX_W-1:0] vq_index;
  dist_t            vq_dist;

  vector_quantizer #(.NUM_CHIPS(NUM_CHIPS)) u_vq (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_en    (cb_wr.we),
    .wr_addr  (cb_wr.addr[IDX_W-1:0]),
    .wr_data  (cb_offset),
    .in_valid (diff_valid && diff_phase == 2'd3),
    .in_vec   (tile),
    .out_valid(vq_valid),
    .index    (vq_index),
    .min_dist (vq_dist)
  );

  // ---- index latch ----
  always_ff @(posedge clk)
    if (!rst_n) begin
      index       <= '0;
      index_valid <= 1'b0;
    end else begin
      index_valid <= vq_valid;
      if (vq_valid) index <= vq_index;
    end

  // ---- inverse vector quantizer ----
  logic [7:0] dhat;
  logic       dhat_valid;

  inverse_vq #(.CODEWORDS(WORDS_PER_CHIP * NUM_CHIPS)) u_ivq (
    .clk       (clk),
    .rst_n     (rst_n),
    .wr_en     (cb_wr.we),
    .wr_addr   (cb_wr.addr[IDX_W-1:0]),
    .wr_data   (cb_wr.data),
    .start     (index_valid),
    .index     (index),
    .dhat      (dhat),
    .dhat_valid(dhat_valid)
  );

  // ---- predicted-value FIFO, reconstruction adder, correction and output latch ----
  delay_fifo #(.WIDTH(SAMPLE_W), .DEPTH(2048), .LATENCY(ENC_LAT - 1)) u_pv_fifo (
    .clk(clk), .rst_n(rst_n), .din(pv), .dout(pv_d));

  sample_t sum_c;
  recon_adder u_add (.pv(pv_d), .dhat(dhat), .recon(sum_c), .overflow(overflow),
                     .underflow(underflow));

  always_ff @(posedge clk)
    if (!rst_n) recon <= '0;
    else        recon <= sum_c;

  // ---- predictor ----
  predictor #(.LINE(LINE), .RECON_GAP(ENC_LAT)) u_pred (
    .clk(clk), .rst_n(rst_n), .recon(recon), .pv(pv));

  // the decoded difference stream is continuous once the first tile is through
  logic seen_dhat;
  always_ff @(posedge clk)
    if (!rst_n)          seen_dhat <= 1'b0;
    else if (dhat_valid) seen_dhat <= 1'b1;

  assert property (@(posedge clk) disable iff (!rst_n) seen_dhat |-> dhat_valid)
    else $error("dvq_encoder: gap in the reconstructed stream");

endmodule
