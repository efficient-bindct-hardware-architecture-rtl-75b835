// bindct_2d: forward 8x8 2D BinDCT-C7, serial in, serial out.
//
// An 8x8 block of signed 8-bit samples enters row by row, one sample per
// cycle for 64 cycles starting in the cycle `start` is high. The block
// chain is the document's:
//   input block 1 -> 1D pass 1 (8 -> 12 bits) -> "before SRAM" serializer
//   -> transpose memory -> input block 2 -> 1D pass 2 (12 -> 16 bits)
//   -> output serializer
// ARCH selects which of the four architectures the document retains is
// built (see bindct_1d); the default, 12, uses the most shared stage
// implementations (one add/sub in stages 1, 2 and 3, two in stage 4) and
// is the smallest. Control is three counters and nothing else:
// cntr8-1 and cntr8-2 sequence the two passes, and the cycle counter
// (bindct_cycle_ctrl) starts them, enables the memory and raises out_rdy.
//
// Timing (cycle 0 = start cycle): the 64 coefficients come out on `yout`
// in cycles 107..170 with `out_rdy` high, one per cycle (ARCH 30: 101..164,
// ARCH 22: 99..162, ARCH 7: 97..160). They come out
// column by column of the coefficient matrix: output k is coefficient
// (row k%8, column k/8), where the row index is the vertical frequency and
// the column index the horizontal one.
//
// CONTINUOUS = 0 (default) is the document's main operating mode, one
// block at a time with one transpose memory: `ready` is high only when no
// block is in flight. CONTINUOUS = 1 is the document's continuous mode:
// the transpose memory is doubled (ping-pong) and a block may also start
// exactly 64 cycles after the previous one, so an unbroken stream of
// blocks gives one coefficient per clock cycle after the first 107 cycles.
// A `start` while `ready` is low is ignored.
module bindct_2d
  import bindct_pkg::*;
#(
  parameter bit          CONTINUOUS = 1'b0,  // 1: double transpose memory, back-to-back blocks
  parameter int unsigned ARCH       = 12     // 12, 30, 22 or 7
)(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,    // first sample is on xin
  input  logic signed [IN_W-1:0]  xin,      // serial samples, row-major
  output logic                    ready,    // a start now would be accepted
  output logic                    busy,     // a block is in flight
  output logic                    out_rdy,  // yout holds a coefficient
  output logic signed [OUT_W-1:0] yout      // serial coefficients
);

  localparam int unsigned LAT = int'(arch_sched(ARCH).lat);

  initial assert (ARCH == 12 || ARCH == 30 || ARCH == 22 || ARCH == 7)
    else $error("bindct_2d: ARCH must be 12, 30, 22 or 7");

  logic en1, en2, we, re;
  cnt8_t cnt1, cnt2;

  logic signed [IN_W-1:0]  x1 [N];
  logic signed [MID_W-1:0] y1 [N];
  logic signed [MID_W-1:0] s1;      // before-SRAM serial stream
  logic signed [MID_W-1:0] t;       // transpose memory read data
  logic signed [MID_W-1:0] x2 [N];
  logic signed [OUT_W-1:0] y2 [N];

  bindct_cycle_ctrl #(.CONTINUOUS(CONTINUOUS), .LAT(LAT)) u_ctrl (
    .clk, .rst_n, .start, .ready, .busy, .en1, .we, .re, .en2, .out_rdy);

  // First 1D pass.
  bindct_cntr8 u_cntr1 (.clk, .rst_n, .en(en1), .q(cnt1));
  bindct_input_block #(.W(IN_W)) u_in1 (.clk, .rst_n, .en(en1), .cnt(cnt1), .xin, .x(x1));
  bindct_1d #(.W(IN_W), .ARCH(ARCH)) u_pass1 (.clk, .rst_n, .cnt(cnt1), .x(x1), .y(y1));
  bindct_serializer #(.W(MID_W), .LAT(LAT)) u_ser1 (.cnt(cnt1), .y(y1), .yout(s1));

  // Transpose.
  if (CONTINUOUS) begin : g_pingpong
    bindct_transpose_pingpong #(.W(MID_W)) u_tram (.clk, .rst_n, .we, .wdata(s1), .re, .rdata(t));
  end else begin : g_single
    bindct_transpose_ram #(.W(MID_W)) u_tram (.clk, .rst_n, .we, .wdata(s1), .re, .rdata(t));
  end

  // Second 1D pass.
  bindct_cntr8 u_cntr2 (.clk, .rst_n, .en(en2), .q(cnt2));
  bindct_input_block #(.W(MID_W)) u_in2 (.clk, .rst_n, .en(en2), .cnt(cnt2), .xin(t), .x(x2));
  bindct_1d #(.W(MID_W), .ARCH(ARCH)) u_pass2 (.clk, .rst_n, .cnt(cnt2), .x(x2), .y(y2));
  bindct_serializer #(.W(OUT_W), .LAT(LAT)) u_ser2 (.cnt(cnt2), .y(y2), .yout);

endmodule
