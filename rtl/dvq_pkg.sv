// dvq_pkg: types and constants shared by the differential vector quantization (DVQ) video
// codec. Samples are 8-bit composite-NTSC values taken at four times the colour subcarrier
// (14.31818 MHz); a vector (tile) is four consecutive samples of one line; a VAMPIRE chip holds
// 32 codewords and up to 8 chips may be linked. The 10-bit distortion is the l1 distance of two
// tiles (4 x 255 fits in 10 bits). The host command codes are this design's own choice.
package dvq_pkg;

  localparam int unsigned SAMPLE_W      = 8;    // A/D resolution
  localparam int unsigned VEC_DIM       = 4;    // components per vector (4x1 tile)
  localparam int unsigned WORDS_PER_CHIP = 32;  // codewords in one VAMPIRE chip
  localparam int unsigned DIST_W        = 10;   // l1 distortion width: 4*255 = 1020 < 1024
  localparam int unsigned SAMPLES_PER_LINE = 910;  // 4 fsc samples per NTSC line
  localparam int unsigned LINES_PER_FRAME  = 526;  // lines per stored frame

  typedef logic [SAMPLE_W-1:0] sample_t;
  typedef logic [VEC_DIM-1:0][SAMPLE_W-1:0] vec_t;     // [c] = component c, c=0 first in time
  typedef logic [DIST_W-1:0] dist_t;

  // Host command bytes received by the controller through the SCSI interface
  typedef enum logic [7:0] {
    CMD_NOP      = 8'h00,
    CMD_CAPTURE  = 8'h01,  // store the next whole frame from the A/D in the frame buffer
    CMD_UPLOAD   = 8'h02,  // send the stored frame to the host
    CMD_DOWNLOAD = 8'h03,  // receive a frame from the host into the frame buffer
    CMD_PLAY     = 8'h04,  // frame buffer drives the video bus, repeating its frame
    CMD_LIVE     = 8'h05,  // A/D drives the video bus
    CMD_OUTSEL   = 8'h06,  // next byte selects the D/A source (see dac_sel_e)
    CMD_LOAD_CB  = 8'h07   // next bytes: codebook, 4 signed difference bytes per codeword
  } cmd_e;

  // Source of the D/A converter (the three output buffers of the system diagram)
  typedef enum logic [1:0] {
    DAC_VIDEO   = 2'd0,   // video bus unprocessed
    DAC_ENCODER = 2'd1,   // reconstructed samples inside the encoder
    DAC_DECODER = 2'd2    // decoder output
  } dac_sel_e;

  // One codeword write, as signed (two's complement) difference components
  typedef struct packed {
    logic       we;
    logic [7:0] addr;   // global codeword index (chip * 32 + word)
    vec_t       data;   // signed difference per component
  } cb_wr_t;

  // Status and event flags brought out of the system (one bit per event, valid per cycle)
  typedef struct packed {
    logic vsync;          // sync detector found a vertical sync (a field starts)
    logic field;          // current field of the frame
    logic capture_busy;   // frame buffer waiting for or storing a frame
    logic play_sof;       // frame buffer replays sample 0 of its frame
    logic enc_clip;       // encoder difference saturated by the 9-to-8-bit converter
    logic enc_overflow;   // encoder reconstruction clamped at 255
    logic enc_underflow;  // encoder reconstruction clamped at 0
    logic dec_valid;      // decoder output carries a reconstructed sample
    logic dec_overflow;   // decoder reconstruction clamped at 255
    logic dec_underflow;  // decoder reconstruction clamped at 0
  } dvq_status_t;

endpackage
