// delay_fifo: a FIFO (2048 words x 9 bits, like the CMOS FIFOs of the encoder) written and read
// on every clock at a fixed occupancy, so that it acts as a delay line of LATENCY samples:
// dout during cycle t equals din during cycle t - LATENCY.
//
// After reset the FIFO fills for LATENCY-1 cycles without being read and its output register
// holds 0, so the line behaves as if it had been preloaded with zeros. The read is registered
// (one access per cycle); the memory is a plain array with one write and one read port.
// Using FIFOs as fixed line delays follows the encoder block diagram; the fill-then-stream
// control and the zero output while filling are this design's own.
module delay_fifo #(
  parameter int unsigned WIDTH   = 9,
  parameter int unsigned DEPTH   = 2048,
  parameter int unsigned LATENCY = 908
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  localparam int unsigned AW = $clog2(DEPTH);

  if (LATENCY < 2 || LATENCY > DEPTH) begin : g_bad
    $error("delay_fifo: LATENCY must lie in 2..DEPTH");
  end

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic [AW:0]      fill;

  always_ff @(posedge clk)
    mem[wp] <= din;

  always_ff @(posedge clk)
    if (!rst_n) begin
      wp   <= '0;
      rp   <= '0;
      fill <= '0;
      dout <= '0;
    end else begin
      wp <= wp + 1'b1;
      if (fill == (AW+1)'(LATENCY - 1)) begin
        dout <= mem[rp];
        rp   <= rp + 1'b1;
      end else begin
        fill <= fill + 1'b1;
      end
    end

endmodule
