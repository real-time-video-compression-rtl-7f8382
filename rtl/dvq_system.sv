// dvq_system: real-time DVQ video compression system. Composite NTSC video sampled at four
// times the colour subcarrier enters as 8-bit samples; a video bus carries either these live
// samples or a frame replayed from the frame buffer into the encoder, which produces one codebook
// index per 4-sample tile for the channel. The decoder rebuilds the video from indices that
// come back from the channel. The D/A receives the video bus, the encoder's reconstruction or
// the decoder output. A controller, driven by a host through a SCSI interface, captures,
// uploads and downloads frames, switches the routing and loads the codebook.
//
// Ports: clk is the sample clock (one sample per cycle), rst_n a synchronous active-low reset.
// ad_sample comes from the A/D converter and da_sample goes to the D/A converter. The host byte
// streams (h2d_*, d2h_*) stand for the SCSI interface. enc_index/enc_index_valid go out to the
// channel and dec_index/dec_index_valid come back from it. Status: busy (controller working)
// frame_start (sync detector) and the event flags in status.
//
// Units and their connections follow the system block diagram; the A/D, D/A, SCSI interface
// and channel are outside this module. The decoder shares the encoder's codebook writes.
module dvq_system
  import dvq_pkg::*;
#(
  parameter int unsigned NUM_CHIPS     = 1,
  parameter int unsigned LINE          = SAMPLES_PER_LINE,
  parameter int unsigned LINES         = LINES_PER_FRAME,
  parameter int unsigned FB_DEPTH      = 524288,
  parameter logic [7:0]  SYNC_LEVEL    = 8'd32,
  parameter int unsigned VSYNC_RUN     = 200,
  parameter int unsigned HOLDOFF       = 8 * SAMPLES_PER_LINE,
  localparam int unsigned IDX_W        = $clog2(WORDS_PER_CHIP * NUM_CHIPS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  sample_t          ad_sample,
  output sample_t          da_sample,
  input  logic             h2d_valid,
  output logic             h2d_ready,
  input  logic [7:0]       h2d_data,
  output logic             d2h_valid,
  input  logic             d2h_ready,
  output logic [7:0]       d2h_data,
  output logic [IDX_W-1:0] enc_index,
  output logic             enc_index_valid,
  input  logic [IDX_W-1:0] dec_index,
  input  logic             dec_index_valid,
  output logic             busy,
  output logic             frame_start,
  output dvq_status_t      status
);

  localparam int unsigned FRAME_SAMPLES = LINE * LINES;

  // ---- synchronization ----
  logic vsync, field;
  sync_detector #(.SYNC_LEVEL(SYNC_LEVEL), .VSYNC_RUN(VSYNC_RUN), .HOLDOFF(HOLDOFF)) u_sync (
    .clk(clk), .rst_n(rst_n), .sample(ad_sample), .vsync(vsync), .frame_start(frame_start),
    .field(field));

  // ---- controller ----
  logic     fb_capture_req, fb_capture_done, fb_capture_busy;
  logic     fb_host_clr, fb_host_we, fb_host_re, fb_host_rvalid, fb_play;
  sample_t  fb_host_wdata, fb_host_rdata;
  dac_sel_e dac_sel;
  cb_wr_t   cb_wr;

  controller #(.FRAME_SAMPLES(FRAME_SAMPLES), .CODEWORDS(WORDS_PER_CHIP * NUM_CHIPS)) u_ctrl (
    .clk(clk), .rst_n(rst_n),
    .h2d_valid(h2d_valid), .h2d_ready(h2d_ready), .h2d_data(h2d_data),
    .d2h_valid(d2h_valid), .d2h_ready(d2h_ready), .d2h_data(d2h_data),
    .fb_capture_req(fb_capture_req), .fb_capture_done(fb_capture_done),
    .fb_host_clr(fb_host_clr), .fb_host_we(fb_host_we), .fb_host_wdata(fb_host_wdata),
    .fb_host_re(fb_host_re), .fb_host_rdata(fb_host_rdata), .fb_host_rvalid(fb_host_rvalid),
    .fb_play(fb_play), .dac_sel(dac_sel), .cb_wr(cb_wr), .busy(busy));

  // ---- frame buffer ----
  sample_t play_data;
  logic    play_valid, play_sof;

  frame_buffer #(.DEPTH(FB_DEPTH), .FRAME_SAMPLES(FRAME_SAMPLES)) u_fb (
    .clk(clk), .rst_n(rst_n),
    .ad_sample(ad_sample), .frame_start(frame_start),
    .capture_req(fb_capture_req), .capture_busy(fb_capture_busy),
    .capture_done(fb_capture_done),
    .host_clr(fb_host_clr), .host_we(fb_host_we), .host_wdata(fb_host_wdata),
    .host_re(fb_host_re), .host_rdata(fb_host_rdata), .host_rvalid(fb_host_rvalid),
    .play(fb_play), .play_data(play_data), .play_valid(play_valid), .play_sof(play_sof));

  // ---- video bus: A/D buffer or frame buffer through the transmission gate ----
  sample_t video_bus;
  assign video_bus = (fb_play && play_valid) ? play_data : ad_sample;

  // ---- encoder and decoder ----
  sample_t enc_recon, dec_recon;
  logic    enc_clip, enc_ovf, enc_unf, dec_valid, dec_ovf, dec_unf;

  dvq_encoder #(.LINE(LINE), .NUM_CHIPS(NUM_CHIPS)) u_enc (
    .clk(clk), .rst_n(rst_n), .cb_wr(cb_wr), .pix_in(video_bus),
    .index(enc_index), .index_valid(enc_index_valid), .recon(enc_recon),
    .clip(enc_clip), .overflow(enc_ovf), .underflow(enc_unf));

  dvq_decoder #(.LINE(LINE), .CODEWORDS(WORDS_PER_CHIP * NUM_CHIPS)) u_dec (
    .clk(clk), .rst_n(rst_n), .cb_wr(cb_wr), .index_in(dec_index),
    .index_valid(dec_index_valid), .recon(dec_recon), .recon_valid(dec_valid),
    .overflow(dec_ovf), .underflow(dec_unf));

  always_comb begin
    status.vsync         = vsync;
    status.field         = field;
    status.capture_busy  = fb_capture_busy;
    status.play_sof      = play_sof;
    status.enc_clip      = enc_clip;
    status.enc_overflow  = enc_ovf;
    status.enc_underflow = enc_unf;
    status.dec_valid     = dec_valid;
    status.dec_overflow  = dec_ovf;
    status.dec_underflow = dec_unf;
  end

  // ---- D/A output buffers ----
  always_comb
    unique case (dac_sel)
      DAC_ENCODER: da_sample = enc_recon;
      DAC_DECODER: da_sample = dec_recon;
      default:     da_sample = video_bus;
    endcase

endmodule
