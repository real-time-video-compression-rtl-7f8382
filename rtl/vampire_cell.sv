// vampire_cell: one computation cell of the VAMPIRE associative memory, bit-slice b of one
// stored word. Eight cells side by side (MSB cell on the left) make up one word's distortion
// unit; the chip has 8 cells for each of its 32 words.
//
// The cell holds bit b of the four stored components (its "RAM bits", written when the word
// line is high) and sees bit b of the four input components on the bit lines. Purely
// combinational otherwise, it contributes:
//   * per component, a greater-than ripple (LSB to MSB): gt_out = x>y at this bit, or equal
//     here and gt_in. The end circuit returns the word-wide result as GT;
//   * per component, bit b of |x - y| by a ripple subtractor whose operands are swapped by GT;
//   * bit b of the component sums |d0|+|d1| and |d2|+|d3| and of the final sum (ripple carries);
//   * the compare-bus stage of the minimum search: a still-qualified word whose distortion bit
//     is 0 pulls the shared compare line for bit b (drawn as a wired-NOR line, modelled here as
//     an active-high "some qualified word has a 0" signal), and a word whose bit is 1 while the
//     line is pulled loses its qualification (propagate chain, MSB to LSB).
// The cell rows, the carry chain names and the direction of each chain follow the cell drawing;
// the logic equations inside each row are this design's own.
module vampire_cell (
  input  logic       clk,
  input  logic       word,        // word line: write wbits into the RAM bits
  input  logic [3:0] wbits,       // bit b of the four components to be written
  input  logic [3:0] xbits,       // bit b of the four input components
  input  logic [3:0] gt_in,       // greater-than ripple from the less significant cell
  output logic [3:0] gt_out,
  input  logic [3:0] gt,          // word-wide x > y per component, from the end circuit
  input  logic [3:0] cin_diff,    // borrow in of the |x-y| subtractors
  output logic [3:0] cout_diff,
  input  logic       cin_sum01,   // carry in of component sum 0,1
  output logic       cout_sum01,
  input  logic       cin_sum23,   // carry in of component sum 2,3
  output logic       cout_sum23,
  input  logic       cin_final,   // carry in of the final sum
  output logic       cout_final,
  input  logic       prop_in,     // word still qualified after the more significant bits
  output logic       prop_out,
  output logic       cmp_drive,   // pulls the compare line for this bit
  input  logic       cmp_line     // resolved compare line: some qualified word has a 0 here
);

  logic [3:0] ram;     // stored bits
  logic [3:0] ad;      // bit b of |x_c - y_c|
  logic       s01, s23, sfin;

  always_ff @(posedge clk)
    if (word) ram <= wbits;

  // greater-than ripple and absolute-difference subtractors, one per component
  for (genvar c = 0; c < 4; c++) begin : g_comp
    logic a, bb;   // minuend is the larger operand
    assign gt_out[c]    = (xbits[c] & ~ram[c]) | (~(xbits[c] ^ ram[c]) & gt_in[c]);
    assign a            = gt[c] ? xbits[c] : ram[c];
    assign bb           = gt[c] ? ram[c]   : xbits[c];
    assign ad[c]        = a ^ bb ^ cin_diff[c];
    assign cout_diff[c] = (~a & bb) | (~(a ^ bb) & cin_diff[c]);
  end

  // component sums 0,1 and 2,3, and the final sum
  assign s01        = ad[0] ^ ad[1] ^ cin_sum01;
  assign cout_sum01 = (ad[0] & ad[1]) | (cin_sum01 & (ad[0] ^ ad[1]));
  assign s23        = ad[2] ^ ad[3] ^ cin_sum23;
  assign cout_sum23 = (ad[2] & ad[3]) | (cin_sum23 & (ad[2] ^ ad[3]));
  assign sfin       = s01 ^ s23 ^ cin_final;
  assign cout_final = (s01 & s23) | (cin_final & (s01 ^ s23));

  // compare-bus stage for distortion bit b
  assign cmp_drive  = prop_in & ~sfin;
  assign prop_out   = prop_in & ~(sfin & cmp_line);

endmodule
