// bindct_1d: one 8-point forward BinDCT-C7 pass (stages 1 to 4).
//
// The four stages are chained and all run from the same cntr8 count.
// ARCH selects one of the four architectures the document retains, i.e.
// the implementation of each stage and the count of every operation
// (tables in bindct_pkg):
//   ARCH 12 (default): stages 1, 2, 3 with one add/sub each, stage 4 with
//     two; stage 1 on counts 1..8, stage 2 on 3..6, stage 3 on 6..8 and
//     1..5, stage 4 on 4..7 of the next period.
//   ARCH 30: stage 1 with an adder and a subtractor, otherwise as ARCH 12.
//   ARCH 22: stages 1 and 3 with an adder and a subtractor each.
//   ARCH 7:  stage 1 fully parallel, stage 3 with an adder and a
//     subtractor.
// The stages overlap: while stage 1 works on line n, stages 3 and 4 finish
// line n-1, so a new line is accepted every 8 cycles in all cases. There
// is no handshake and no state machine; every register enable comes from
// the count, as in the document.
//
// Timing: a line loaded into `x` at the end of count 8 has its results in
// the `y` registers in time for a serial read of Yk, k = 0..7, in the
// cycle LAT+k after the line's first sample entered the input block
// (LAT = 21, 18, 17, 16 cycles for ARCH 12, 30, 22, 7); each Yk holds for
// 8 cycles. Width: W-bit input, W+4-bit output (one bit per stage).
module bindct_1d
  import bindct_pkg::*;
#(
  parameter int unsigned W    = IN_W,
  parameter int unsigned ARCH = 12      // 12, 30, 22 or 7
)(
  input  logic                  clk,
  input  logic                  rst_n,
  input  cnt8_t                 cnt,
  input  logic signed [W-1:0]   x [N],
  output logic signed [W+3:0]   y [N]
);

  localparam sched_t S = arch_sched(ARCH);

  logic signed [W:0]   a [N];
  logic signed [W+1:0] z1, z2;
  logic signed [W+2:0] b [4];
  logic signed [W+2:0] d [4];

  bindct_stage1 #(.W(W), .SOL(int'(S.s1_sol)), .T0(S.s1_t0)) u_s1 (.clk, .rst_n, .cnt, .x, .a);
  bindct_stage2 #(.W(W + 1), .T0(S.s2_t0)) u_s2 (.clk, .rst_n, .cnt, .a5(a[5]), .a6(a[6]), .z1, .z2);
  bindct_stage3 #(.W(W + 2), .SOL(int'(S.s3_sol)), .T(S.s3_t)) u_s3 (.clk, .rst_n, .cnt, .a, .z1, .z2, .b, .d);
  bindct_stage4 #(.W(W + 3), .T(S.s4_t), .OPB(S.s4_opb)) u_s4 (.clk, .rst_n, .cnt, .b, .d, .y);

endmodule
