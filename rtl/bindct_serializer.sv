// bindct_serializer: parallel-to-serial output of a 1D pass.
//
// Used twice: as the "before SRAM" block, which streams the first pass's
// results into the transpose memory, and as the 2D output block. Stage 4
// leaves its eight results in registers that stay valid for a whole 8-cycle
// period, so the serializer is an 8-to-1 multiplexer selected by the cntr8
// count: with a pass latency LAT it emits Yk on the counts congruent to
// LAT+k modulo 8. For the default LAT = 21 that is Y0 on count 5 (the
// cycle after Y0 is written), Y1, Y2, Y3 on counts 6, 7, 8 and Y4..Y7 on
// counts 1..4 of the next period. Each Yk is read no earlier than the cycle after stage 4 writes it
// and no later than the cycle before it is overwritten by the next line,
// so the stream is continuous, one coefficient per cycle in ascending
// order, as the document requires. Using the stage-4 registers themselves
// as the storage (no extra register) is this design's choice.
//
// Timing: combinational from `y` and `cnt`.
module bindct_serializer
  import bindct_pkg::*;
#(
  parameter int unsigned W   = MID_W,
  parameter int unsigned LAT = 21       // 1D pass latency (see bindct_pkg)
)(
  input  cnt8_t               cnt,
  input  logic signed [W-1:0] y [N],
  output logic signed [W-1:0] yout
);

  localparam cnt8_t OFS = cnt8_t'((N - (LAT % N)) % N);

  logic [2:0] k;   // index of the coefficient on the output

  always_comb begin
    k    = 3'(cnt + OFS);   // LAT 21: 5->0, 6->1, 7->2, 8->3, 1->4, ..., 4->7
    yout = y[k];
  end

endmodule
