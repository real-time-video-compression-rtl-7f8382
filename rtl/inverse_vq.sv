// inverse_vq: inverse vector quantizer. Four RAMs, one per vector component, hold the
// difference codebook as signed (two's complement) 8-bit values. When `start` is high the index
// is looked up in RAM 0, and in the three following cycles in RAMs 1, 2 and 3 (the index must be
// held meanwhile); the shared output latch therefore delivers the four components of the
// decoded difference tile in sample order, one per cycle, starting the cycle after `start`.
// Writes (one codeword, all four RAMs, per cycle) come from the codebook loader.
// The four RAMs and the shared output latch follow the encoder diagram; the read sequencing is
// this design's. The latch holds 0 after reset and keeps its value between tiles.
module inverse_vq
  import dvq_pkg::*;
#(
  parameter int unsigned CODEWORDS = WORDS_PER_CHIP,
  localparam int unsigned IDX_W    = $clog2(CODEWORDS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [IDX_W-1:0] wr_addr,
  input  vec_t             wr_data,
  input  logic             start,
  input  logic [IDX_W-1:0] index,
  output logic [7:0]       dhat,
  output logic             dhat_valid
);

  logic [7:0] ram0 [CODEWORDS];
  logic [7:0] ram1 [CODEWORDS];
  logic [7:0] ram2 [CODEWORDS];
  logic [7:0] ram3 [CODEWORDS];

  always_ff @(posedge clk)
    if (wr_en) begin
      ram0[wr_addr] <= wr_data[0];
      ram1[wr_addr] <= wr_data[1];
      ram2[wr_addr] <= wr_data[2];
      ram3[wr_addr] <= wr_data[3];
    end

  logic [1:0] cnt;
  logic       busy;
  logic [1:0] sel;
  logic       rd;

  assign sel = start ? 2'd0 : cnt;
  assign rd  = start | busy;

  always_ff @(posedge clk)
    if (!rst_n) begin
      cnt        <= '0;
      busy       <= 1'b0;
      dhat       <= '0;
      dhat_valid <= 1'b0;
    end else begin
      dhat_valid <= rd;
      if (start) begin
        cnt  <= 2'd1;
        busy <= 1'b1;
      end else if (busy) begin
        cnt <= cnt + 2'd1;
        if (cnt == 2'd3) busy <= 1'b0;
      end
      if (rd)
        unique case (sel)
          2'd0: dhat <= ram0[index];
          2'd1: dhat <= ram1[index];
          2'd2: dhat <= ram2[index];
          2'd3: dhat <= ram3[index];
        endcase
    end

endmodule
