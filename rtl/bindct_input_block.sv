// bindct_input_block: serial-to-parallel input of one 1D BinDCT pass.
//
// One sample arrives per cycle on `xin`. While `en` is high it is shifted
// into an eight-deep shift register. In the cycle cntr8 reads 8 the eight
// samples gathered so far (the current line, oldest = x0) are copied into
// the X registers, which then hold the line steady for the eight cycles
// stage 1 needs, while the next line is already being shifted in. This is
// the structure the document gives (8 shift registers, 8 load-enabled X
// registers, load on count 8). The first line therefore takes 9 cycles
// (counts 0..8) and every later line 8 cycles: an initiation period of one
// sample per cycle.
//
// Timing: x(0) of a line must be on `xin` in the cycle the count is 0
// (first line) or 8 (later lines); `x` is valid from the cycle after the
// count reads 8 and holds for eight cycles.
module bindct_input_block
  import bindct_pkg::*;
#(
  parameter int unsigned W = IN_W   // sample width
)(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,       // shift enable (same enable as cntr8)
  input  cnt8_t               cnt,      // cntr8 value
  input  logic signed [W-1:0] xin,      // serial sample
  output logic signed [W-1:0] x [N]     // parallel line x0..x7
);

  logic signed [W-1:0] sr [N];   // sr[0] newest, sr[N-1] oldest

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) sr[i] <= '0;
    end else if (en) begin
      sr[0] <= xin;
      for (int i = 1; i < N; i++) sr[i] <= sr[i-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) x[i] <= '0;
    end else if (en && cnt == cnt8_t'(8)) begin
      for (int i = 0; i < N; i++) x[i] <= sr[N-1-i];
    end
  end

endmodule
