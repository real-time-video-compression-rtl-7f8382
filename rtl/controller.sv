// controller: routes data between the units of the DVQ system and serves the host. Commands
// and data arrive as a byte stream from the SCSI interface (valid/ready), and frame data goes
// back the same way. Commands (codes in dvq_pkg::cmd_e, this design's choice):
//   CAPTURE   switch the video bus to the A/D and store the next whole frame;
//   UPLOAD    send the FRAME_SAMPLES bytes of the stored frame to the host;
//   DOWNLOAD  receive FRAME_SAMPLES bytes into the frame buffer;
//   PLAY      the frame buffer drives the video bus, repeating its frame;
//   LIVE      the A/D drives the video bus;
//   OUTSEL s  the D/A shows the video bus (0), the encoder's reconstruction (1) or the decoder (2);
//   LOAD_CB   receive CODEWORDS x 4 signed difference bytes (component 0 first) and write each
//             codeword into the vector quantizer and both inverse quantizers.
// busy is high while a command is executing. Unknown command bytes are ignored.
// The document gives the controller's role (routing, SCSI, frame upload/download, codebook
// load); the command set and the byte protocol are this design's.
module controller
  import dvq_pkg::*;
#(
  parameter int unsigned FRAME_SAMPLES = SAMPLES_PER_LINE * LINES_PER_FRAME,
  parameter int unsigned CODEWORDS     = WORDS_PER_CHIP
) (
  input  logic       clk,
  input  logic       rst_n,
  // host byte stream, host to device
  input  logic       h2d_valid,
  output logic       h2d_ready,
  input  logic [7:0] h2d_data,
  // host byte stream, device to host
  output logic       d2h_valid,
  input  logic       d2h_ready,
  output logic [7:0] d2h_data,
  // frame buffer
  output logic       fb_capture_req,
  input  logic       fb_capture_done,
  output logic       fb_host_clr,
  output logic       fb_host_we,
  output sample_t    fb_host_wdata,
  output logic       fb_host_re,
  input  sample_t    fb_host_rdata,
  input  logic       fb_host_rvalid,
  output logic       fb_play,
  // routing and codebook
  output dac_sel_e   dac_sel,
  output cb_wr_t     cb_wr,
  output logic       busy
);

  localparam int unsigned CW = $clog2(FRAME_SAMPLES + 1);

  typedef enum logic [2:0] {S_IDLE, S_OUTSEL, S_LOADCB, S_DOWN, S_UP_REQ, S_UP_WAIT, S_UP_SEND,
                            S_CAPTURE} state_e;
  state_e        st;
  logic [CW-1:0] count;
  logic [1:0]    comp;
  logic [2:0][7:0] cw_acc;   // components 0..2 of the codeword being received

  assign h2d_ready = (st == S_IDLE) || (st == S_OUTSEL) || (st == S_LOADCB) || (st == S_DOWN);
  assign busy      = (st != S_IDLE);

  logic take;
  assign take = h2d_valid && h2d_ready;

  always_comb begin
    // the frame buffer's host address is cleared as an upload or download command is taken
    fb_host_clr   = (st == S_IDLE) && take && (h2d_data == CMD_UPLOAD || h2d_data == CMD_DOWNLOAD);
    fb_host_we    = (st == S_DOWN) && take;
    fb_host_wdata = h2d_data;
    fb_host_re    = (st == S_UP_REQ);
  end

  always_ff @(posedge clk)
    if (!rst_n) begin
      st             <= S_IDLE;
      count          <= '0;
      comp           <= '0;
      cw_acc         <= '0;
      fb_capture_req <= 1'b0;
      fb_play        <= 1'b0;
      dac_sel        <= DAC_VIDEO;
      cb_wr          <= '0;
      d2h_valid      <= 1'b0;
      d2h_data       <= '0;
    end else begin
      fb_capture_req <= 1'b0;
      cb_wr.we       <= 1'b0;
      unique case (st)
        S_IDLE: if (take) begin
          count <= '0;
          comp  <= '0;
          case (h2d_data)
            CMD_CAPTURE:  begin
                            fb_play        <= 1'b0;
                            fb_capture_req <= 1'b1;
                            st             <= S_CAPTURE;
                          end
            CMD_UPLOAD:   begin fb_play <= 1'b0; st <= S_UP_REQ; end
            CMD_DOWNLOAD: begin fb_play <= 1'b0; st <= S_DOWN;   end
            CMD_PLAY:     fb_play <= 1'b1;
            CMD_LIVE:     fb_play <= 1'b0;
            CMD_OUTSEL:   st <= S_OUTSEL;
            CMD_LOAD_CB:  st <= S_LOADCB;
            default:      ;
          endcase
        end
        S_OUTSEL: if (take) begin
          dac_sel <= dac_sel_e'(h2d_data[1:0] == 2'd3 ? 2'd0 : h2d_data[1:0]);
          st      <= S_IDLE;
        end
        S_LOADCB: if (take) begin
          cw_acc[comp] <= h2d_data;
          comp         <= comp + 2'd1;
          if (comp == 2'd3) begin
            cb_wr.we      <= 1'b1;
            cb_wr.addr    <= count[7:0];
            cb_wr.data    <= {h2d_data, cw_acc[2], cw_acc[1], cw_acc[0]};
            count         <= count + 1'b1;
            if (count == CW'(CODEWORDS - 1)) st <= S_IDLE;
          end
        end
        S_DOWN: if (take) begin
          count <= count + 1'b1;
          if (count == CW'(FRAME_SAMPLES - 1)) st <= S_IDLE;
        end
        S_UP_REQ:  st <= S_UP_WAIT;
        S_UP_WAIT: if (fb_host_rvalid) begin
          d2h_data  <= fb_host_rdata;
          d2h_valid <= 1'b1;
          st        <= S_UP_SEND;
        end
        S_UP_SEND: if (d2h_ready) begin
          d2h_valid <= 1'b0;
          count     <= count + 1'b1;
          st        <= (count == CW'(FRAME_SAMPLES - 1)) ? S_IDLE : S_UP_REQ;
        end
        S_CAPTURE: if (fb_capture_done) st <= S_IDLE;
        default:   st <= S_IDLE;
      endcase
    end

endmodule
