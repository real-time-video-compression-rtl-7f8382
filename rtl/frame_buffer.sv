// frame_buffer: one-frame video store (512K x 8, dynamic RAM in the original) with its address
// counters. It can
//   * capture: after capture_req, wait for the next frame_start from the sync detector and
//     store FRAME_SAMPLES consecutive samples from the A/D (capture_done pulses at the end);
//   * take or give a frame over the host port: host_clr resets the host address, host_we writes
//     host_wdata and advances, host_re reads (host_rdata valid with host_rvalid one cycle later)
//     and advances;
//   * play: while `play` is high, read the stored frame over and over, one sample per cycle
//     (play_data one cycle after its address; play_sof marks sample 0 of each repetition).
// The memory has one port; capture has priority over the host port, and the host port over
// playback (the controller never overlaps them). A frame of FRAME_SAMPLES = 910 x 526 samples
// fits in the 2^19 locations. The operations follow the document; the port protocol is this
// design's.
module frame_buffer
  import dvq_pkg::*;
#(
  parameter int unsigned DEPTH         = 524288,
  parameter int unsigned FRAME_SAMPLES = SAMPLES_PER_LINE * LINES_PER_FRAME,
  localparam int unsigned AW           = $clog2(DEPTH)
) (
  input  logic    clk,
  input  logic    rst_n,
  // capture from the A/D
  input  sample_t ad_sample,
  input  logic    frame_start,
  input  logic    capture_req,
  output logic    capture_busy,
  output logic    capture_done,
  // host port
  input  logic    host_clr,
  input  logic    host_we,
  input  sample_t host_wdata,
  input  logic    host_re,
  output sample_t host_rdata,
  output logic    host_rvalid,
  // playback
  input  logic    play,
  output sample_t play_data,
  output logic    play_valid,
  output logic    play_sof
);

  if (FRAME_SAMPLES > DEPTH) begin : g_bad
    $error("frame_buffer: frame does not fit");
  end

  sample_t mem [DEPTH];

  typedef enum logic [1:0] {CAP_IDLE, CAP_ARMED, CAP_RUN} cap_e;
  cap_e          cap_st;
  logic [AW-1:0] cap_addr, host_addr, play_addr;

  logic          cap_wr;
  assign cap_wr = (cap_st == CAP_RUN) || (cap_st == CAP_ARMED && frame_start);
  assign capture_busy = (cap_st != CAP_IDLE);

  // one memory port: write address/data and read address
  logic          we;
  logic [AW-1:0] waddr, raddr;
  sample_t       wdata;
  logic          host_rd, play_rd;

  always_comb begin
    we      = cap_wr | host_we;
    waddr   = cap_wr ? cap_addr : host_addr;
    wdata   = cap_wr ? ad_sample : host_wdata;
    host_rd = host_re && !cap_wr && !host_we;
    play_rd = play && !cap_wr && !host_we && !host_re;
    raddr   = host_rd ? host_addr : play_addr;
  end

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  sample_t rdata;
  always_ff @(posedge clk)
    rdata <= mem[raddr];

  assign host_rdata = rdata;
  assign play_data  = rdata;

  always_ff @(posedge clk)
    if (!rst_n) begin
      cap_st       <= CAP_IDLE;
      cap_addr     <= '0;
      capture_done <= 1'b0;
      host_addr    <= '0;
      host_rvalid  <= 1'b0;
      play_addr    <= '0;
      play_valid   <= 1'b0;
      play_sof     <= 1'b0;
    end else begin
      capture_done <= 1'b0;
      unique case (cap_st)
        CAP_IDLE:  if (capture_req) begin
                     cap_st   <= CAP_ARMED;
                     cap_addr <= '0;
                   end
        CAP_ARMED: if (frame_start) begin
                     cap_st   <= CAP_RUN;
                     cap_addr <= AW'(1);
                   end
        CAP_RUN:   if (cap_addr == AW'(FRAME_SAMPLES - 1)) begin
                     cap_st       <= CAP_IDLE;
                     capture_done <= 1'b1;
                   end else begin
                     cap_addr <= cap_addr + 1'b1;
                   end
        default:   cap_st <= CAP_IDLE;
      endcase

      if (host_clr)                 host_addr <= '0;
      else if (host_we && !cap_wr)  host_addr <= host_addr + 1'b1;
      else if (host_rd)             host_addr <= host_addr + 1'b1;
      host_rvalid <= host_rd;

      play_valid <= play_rd;
      play_sof   <= play_rd && (play_addr == '0);
      if (!play)        play_addr <= '0;
      else if (play_rd) play_addr <= (play_addr == AW'(FRAME_SAMPLES - 1)) ? '0
                                                                           : play_addr + 1'b1;
    end

endmodule
