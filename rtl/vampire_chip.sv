// vampire_chip: the VAMPIRE associative memory (Vector-quantizing Associative Memory Processor
// Implementing Real-time Encoding). It stores WORDS codewords of four 8-bit components and, for
// an input vector, finds the stored word at the smallest l1 (city-block) distance.
//
// Organisation follows the chip floorplan: every word is a row of eight bit-slice computation
// cells (vampire_cell, MSB cell on the left) plus an end circuit on the MSB side. The cells
// ripple the greater-than, subtract and sum carries from LSB to MSB; the end circuit forms
// distortion bits 9 and 8 from the carries out of the MSB cell and returns the greater-than
// results to the row. Compare lines C9..C0 run vertically through all words: starting at C9,
// every still-qualified word whose distortion bit is 0 pulls the line, and words with a 1 on a
// pulled line drop out. After C0 only the words at the minimum distortion remain; a priority
// encoder picks the lowest address among them. The minimum itself is the complement of the
// compare lines.
//
// Timing (this design's choice; reset is synchronous, active low): the input vector is latched
// on the edge where in_valid is high; one cycle later the local minimum and its address are registered and out_valid rises. A new
// vector may enter every cycle. For linked chips, local_min goes onto the inter-chip compare bus
// (compare_bus); `win` tells whether this chip holds the overall winner once bus_min is back.
// Codewords are written through the address decoder, one word per cycle, in the same offset
// binary coding as the input. The key memory drawn beside each word is not built: the address
// itself is the output code, as the text describes the priority encoder placing the address.
module vampire_chip
  import dvq_pkg::*;
#(
  parameter int unsigned WORDS = WORDS_PER_CHIP
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // codeword load
  input  logic                     wr_en,
  input  logic [$clog2(WORDS)-1:0] wr_addr,
  input  vec_t                     wr_data,
  // vectors to quantize
  input  logic                     in_valid,
  input  vec_t                     in_vec,
  // result of this chip
  output logic                     out_valid,
  output dist_t                    local_min,
  output logic [$clog2(WORDS)-1:0] local_addr,
  // inter-chip compare bus
  input  dist_t                    bus_min,
  output logic                     win
);

  localparam int unsigned AW = $clog2(WORDS);

  vec_t in_q;
  logic in_valid_q;

  always_ff @(posedge clk)
    if (!rst_n) in_valid_q <= 1'b0;
    else        in_valid_q <= in_valid;

  always_ff @(posedge clk)
    if (in_valid) in_q <= in_vec;

  // address decoder: one word line per stored word
  logic [WORDS-1:0] word_line;
  always_comb
    for (int w = 0; w < WORDS; w++) word_line[w] = wr_en && (wr_addr == AW'(w));

  // ---- end circuit, MSB side: distortion bits 9 and 8, compare lines C9, C8 ----
  logic [WORDS-1:0][3:0] gt_word;   // x > y per component, from the MSB cell's ripple
  logic [WORDS-1:0]      s9, s8;    // distortion bits 9 and 8
  logic [WORDS-1:0]      drv9, prop8, drv8, prop7;
  logic                  line9, line8;
  logic [WORDS-1:0]      qualified; // after C0

  for (genvar b = 0; b < 8; b++) begin : g_bit
    logic [WORDS-1:0][3:0] gt_o, cd_o;
    logic [WORDS-1:0]      c01_o, c23_o, cf_o, prop_o, drv;
    logic [WORDS-1:0]      prop_i;
    logic                  line;

    assign line = |drv;

    for (genvar w = 0; w < WORDS; w++) begin : g_w
      logic [3:0] xb, wb, gt_i, cd_i;
      logic       c01_i, c23_i, cf_i;
      for (genvar c = 0; c < 4; c++) begin : g_c
        assign xb[c] = in_q[c][b];
        assign wb[c] = wr_data[c][b];
      end
      if (b == 0) begin : g_lsb
        assign gt_i  = '0;
        assign cd_i  = '0;
        assign c01_i = 1'b0;
        assign c23_i = 1'b0;
        assign cf_i  = 1'b0;
      end else begin : g_mid
        assign gt_i  = g_bit[b-1].gt_o[w];
        assign cd_i  = g_bit[b-1].cd_o[w];
        assign c01_i = g_bit[b-1].c01_o[w];
        assign c23_i = g_bit[b-1].c23_o[w];
        assign cf_i  = g_bit[b-1].cf_o[w];
      end
      if (b == 7) begin : g_msb
        assign prop_i[w] = prop7[w];
      end else begin : g_low
        assign prop_i[w] = g_bit[b+1].prop_o[w];
      end

      vampire_cell u_cell (
        .clk       (clk),
        .word      (word_line[w]),
        .wbits     (wb),
        .xbits     (xb),
        .gt_in     (gt_i),
        .gt_out    (gt_o[w]),
        .gt        (gt_word[w]),
        .cin_diff  (cd_i),
        .cout_diff (cd_o[w]),
        .cin_sum01 (c01_i),
        .cout_sum01(c01_o[w]),
        .cin_sum23 (c23_i),
        .cout_sum23(c23_o[w]),
        .cin_final (cf_i),
        .cout_final(cf_o[w]),
        .prop_in   (prop_i[w]),
        .prop_out  (prop_o[w]),
        .cmp_drive (drv[w]),
        .cmp_line  (line)
      );
    end
  end

  // end circuits: the two 9-bit component sums carry into bit 8 of the final sum
  for (genvar w = 0; w < WORDS; w++) begin : g_end
    logic c01, c23, cf;
    assign gt_word[w] = g_bit[7].gt_o[w];
    assign c01     = g_bit[7].c01_o[w];
    assign c23     = g_bit[7].c23_o[w];
    assign cf      = g_bit[7].cf_o[w];
    assign s8[w]   = c01 ^ c23 ^ cf;
    assign s9[w]   = (c01 & c23) | (cf & (c01 ^ c23));
    assign drv9[w] = ~s9[w];                 // every word starts qualified
    assign prop8[w] = ~(s9[w] & line9);
    assign drv8[w]  = prop8[w] & ~s8[w];
    assign prop7[w] = prop8[w] & ~(s8[w] & line8);
  end

  assign line9 = |drv9;
  assign line8 = |drv8;

  assign qualified = g_bit[0].prop_o;

  // priority encoder: lowest qualified address
  logic [AW-1:0] first_addr;
  always_comb begin
    first_addr = '0;
    for (int w = WORDS - 1; w >= 0; w--)
      if (qualified[w]) first_addr = AW'(w);
  end

  dist_t min_now;
  always_comb begin
    min_now[9] = ~line9;
    min_now[8] = ~line8;
    min_now[7] = ~g_bit[7].line;
    min_now[6] = ~g_bit[6].line;
    min_now[5] = ~g_bit[5].line;
    min_now[4] = ~g_bit[4].line;
    min_now[3] = ~g_bit[3].line;
    min_now[2] = ~g_bit[2].line;
    min_now[1] = ~g_bit[1].line;
    min_now[0] = ~g_bit[0].line;
  end

  always_ff @(posedge clk)
    if (!rst_n) begin
      out_valid  <= 1'b0;
      local_min  <= '1;
      local_addr <= '0;
    end else begin
      out_valid <= in_valid_q;
      if (in_valid_q) begin
        local_min  <= min_now;
        local_addr <= first_addr;
      end
    end

  // the larger-minus-smaller subtraction never borrows out of the MSB cell
  assert property (@(posedge clk) disable iff (!rst_n) in_valid_q |-> (g_bit[7].cd_o == '0))
    else $error("vampire_chip: borrow out of |x-y|");

  // chip disqualifies itself unless its minimum equals the overall minimum
  assign win = out_valid && (local_min == bus_min);

endmodule
