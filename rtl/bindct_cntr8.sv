// bindct_cntr8: the "cntr8" sequencer of one 1D BinDCT pass.
//
// While `en` is low the counter sits at 0. Once enabled it counts
// 0,1,...,8 for the first line of a block and then reloads 1 whenever it
// reaches 8, so every later line takes 1..8 (eight cycles). The input
// block loads its eight X registers in the cycle the count is 8, and the
// stage controllers decode their multiplexer selects, operator mode and
// register enables directly from the count, so this counter is the whole
// controller of a 1D pass. This follows the document; returning to 0 when
// disabled is this design's choice, so the next block again starts at 0.
//
// Timing: `q` is registered; it shows 0 in the first enabled cycle.
module bindct_cntr8
  import bindct_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,     // count enable, from the cycle controller
  output cnt8_t q       // current count, 0..8
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             q <= '0;
    else if (!en)           q <= '0;
    else if (q == cnt8_t'(8)) q <= cnt8_t'(1);
    else                    q <= q + cnt8_t'(1);
  end

  // The count never leaves 0..8.
  assert property (@(posedge clk) disable iff (!rst_n) q <= cnt8_t'(8));

endmodule
