// vector_quantizer: full-search vector quantizer for 4-component, 8-bit vectors, built from
// NUM_CHIPS linked VAMPIRE chips of 32 codewords each (one chip, 32 codewords, in the system as
// built; up to 8 chips for 256 codewords). Every chip computes the l1 distortion to all of its
// codewords in parallel and offers its minimum on the compare bus; chips that do not hold the
// overall minimum disqualify themselves, and the address bus carries {chip, word} of the winner.
// When two chips tie, the lower-numbered chip wins (this design's choice, as is the lowest-
// address rule inside a chip).
//
// Interface: codeword k (0 .. 32*NUM_CHIPS-1) is written with wr_en/wr_addr/wr_data, components
// in offset binary (difference + 128). A vector presented with in_valid gives index/out_valid
// three cycles later (chip input latch, chip result register, address-bus register); one vector
// may enter every cycle. min_dist is the winning distortion.
module vector_quantizer
  import dvq_pkg::*;
#(
  parameter int unsigned NUM_CHIPS = 1,
  localparam int unsigned IDX_W    = $clog2(WORDS_PER_CHIP * NUM_CHIPS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [IDX_W-1:0] wr_addr,
  input  vec_t             wr_data,
  input  logic             in_valid,
  input  vec_t             in_vec,
  output logic             out_valid,
  output logic [IDX_W-1:0] index,
  output dist_t            min_dist
);

  localparam int unsigned WAW = $clog2(WORDS_PER_CHIP);

  dist_t                chip_min  [NUM_CHIPS];
  logic [WAW-1:0]       chip_addr [NUM_CHIPS];
  logic [NUM_CHIPS-1:0] chip_valid, chip_win, survivors;
  dist_t                bus_min;

  for (genvar k = 0; k < NUM_CHIPS; k++) begin : g_chip
    logic sel;
    assign sel = wr_en && (32'(wr_addr) / WORDS_PER_CHIP == k);
    vampire_chip #(.WORDS(WORDS_PER_CHIP)) u_chip (
      .clk       (clk),
      .rst_n     (rst_n),
      .wr_en     (sel),
      .wr_addr   (WAW'(32'(wr_addr) % WORDS_PER_CHIP)),
      .wr_data   (wr_data),
      .in_valid  (in_valid),
      .in_vec    (in_vec),
      .out_valid (chip_valid[k]),
      .local_min (chip_min[k]),
      .local_addr(chip_addr[k]),
      .bus_min   (bus_min),
      .win       (chip_win[k])
    );
  end

  compare_bus #(.NUM_CHIPS(NUM_CHIPS)) u_bus (
    .chip_min  (chip_min),
    .chip_valid(chip_valid),
    .bus_min   (bus_min),
    .survivors (survivors)
  );

  // address bus: the lowest-numbered chip that did not disqualify itself drives it
  logic [IDX_W-1:0] bus_addr;
  always_comb begin
    bus_addr = '0;
    for (int k = NUM_CHIPS - 1; k >= 0; k--)
      if (chip_win[k]) bus_addr = IDX_W'(k * WORDS_PER_CHIP + int'(chip_addr[k]));
  end

  always_ff @(posedge clk)
    if (!rst_n) begin
      out_valid <= 1'b0;
      index     <= '0;
      min_dist  <= '0;
    end else begin
      out_valid <= chip_valid[0];
      if (chip_valid[0]) begin
        index <= bus_addr;
        min_dist <= bus_min;
      end
    end

  // the chips' own verdicts agree with the bus
  assert property (@(posedge clk) disable iff (!rst_n) chip_valid[0] |-> (chip_win == survivors))
    else $error("vector_quantizer: chip disqualification disagrees with compare bus");

endmodule
