// bindct_pkg: shared constants and types of the 8x8 forward BinDCT-C7 core.
//
// The transform is the Chen-factorised BinDCT in its C7 configuration:
// every lifting coefficient is a power of two, or a sum of two, so the
// whole transform uses only adders, subtractors and arithmetic right shifts.
//   P1 = 1/2, U1 = 1/2, P2 = 1, U2 = 1/2, P3 = 1/4, U3 = 1/4,
//   P4 = 1/2, U4 = 3/4 = U4' + U4'' = 1/2 + 1/4, P5 = 1/2.
// The shift amounts below encode those coefficients. A right shift by k is
// an arithmetic shift (rounding toward minus infinity); that rounding rule
// is this design's choice.
//
// Word widths follow the document: each of the eight stages grows the
// word by one bit, so the first 1D pass goes 8 -> 12 bits and the second
// 12 -> 16 bits. The input samples are taken as signed two's complement
// (level-shifted pixels), which is this design's choice.
//
// The schedule tables give, for each of the four architectures the
// design can be built as, the stage implementations and the cntr8 count
// at which every intermediate result is computed; the timetable functions
// derive the 2D control windows from a pass's latency. The ARCH 12 table is
// the document's operation order. The ARCH 30, 22 and 7 tables are this
// design's own as-early-as-possible schedules of the document's stage
// solutions; they give first/last outputs at 101/164, 99/162 and 97/160
// cycles (the document gives 166, 162 and 160 as totals).
package bindct_pkg;

  // Word widths (document: 8-bit input, 16-bit 2D output).
  localparam int unsigned IN_W  = 8;
  localparam int unsigned MID_W = IN_W + 4;   // 1st pass output, stored in the transpose memory
  localparam int unsigned OUT_W = MID_W + 4;  // 2nd pass output

  // Block size: 8x8 coefficients, one 1D line is 8 samples.
  localparam int unsigned N       = 8;
  localparam int unsigned NN      = N * N;
  localparam int unsigned ADDR_W  = $clog2(NN);

  // C7 lifting coefficients as right-shift amounts.
  localparam int unsigned SH_P1   = 1;  // 1/2
  localparam int unsigned SH_U1   = 1;  // 1/2
  localparam int unsigned SH_U2   = 1;  // 1/2  (P2 = 1: no shift)
  localparam int unsigned SH_P3   = 2;  // 1/4
  localparam int unsigned SH_U3   = 2;  // 1/4
  localparam int unsigned SH_P4   = 1;  // 1/2
  localparam int unsigned SH_U4A  = 1;  // U4'  = 1/2
  localparam int unsigned SH_U4B  = 2;  // U4'' = 1/4
  localparam int unsigned SH_P5   = 1;  // 1/2
  localparam int unsigned SH_Y0H  = 1;  // Y4 = Y0/2 - b1

  // Counter value type of cntr8 (0..8).
  typedef logic [3:0] cnt8_t;

  // ------------------------------------------------------------------
  // Architectures. A 2D architecture is a choice of implementation per
  // stage (S.1 fully parallel, S.2 one adder + one subtractor, S.3 the
  // most shared form) plus the count at which each result is computed.
  //   ARCH 12: S.3 S.3 S.3 S.3   (smallest)
  //   ARCH 30: S.2 S.3 S.3 S.3
  //   ARCH 22: S.2 S.3 S.2 S.3
  //   ARCH  7: S.1 S.3 S.2 S.3   (fewest cycles)
  // Counts are cntr8 values 1..8; a line is in the X registers from
  // count 1. Stage 3 and 4 tables are indexed b0 b1 b2 b3 d0 d1 d2 d3
  // and Y0..Y7 (index 0 in the least significant nibble).
  typedef struct packed {
    logic [7:0]      lat;      // cycles from a pass's first sample to its first serial result
    logic [1:0]      s1_sol;   // stage 1 solution 1, 2 or 3
    cnt8_t           s1_t0;    // count of stage 1's first operation
    cnt8_t           s2_t0;    // count of Z0 (H, Z1, Z2 follow)
    logic [1:0]      s3_sol;   // stage 3 solution 2 or 3
    logic [7:0][3:0] s3_t;     // stage 3 count per result
    logic [7:0][3:0] s4_t;     // stage 4 count per result
    logic [7:0]      s4_opb;   // stage 4: 1 = result computed by the second add/sub
  } sched_t;

  function automatic sched_t arch_sched(input int arch);
    sched_t s;
    unique case (arch)
      7: begin
        s.lat = 8'd16; s.s1_sol = 2'd1; s.s1_t0 = 4'd1; s.s2_t0 = 4'd2; s.s3_sol = 2'd2;
        //            d3    d2    d1    d0    b3    b2    b1    b0
        s.s3_t   = {4'd5, 4'd5, 4'd6, 4'd6, 4'd3, 4'd2, 4'd2, 4'd3};
        //            Y7    Y6    Y5    Y4    Y3    Y2    Y1    Y0
        s.s4_t   = {4'd7, 4'd8, 4'd1, 4'd2, 4'd2, 4'd1, 4'd8, 4'd7};
        s.s4_opb = 8'b1111_0000;
      end
      22: begin
        s.lat = 8'd17; s.s1_sol = 2'd2; s.s1_t0 = 4'd1; s.s2_t0 = 4'd3; s.s3_sol = 2'd2;
        s.s3_t   = {4'd6, 4'd6, 4'd7, 4'd7, 4'd5, 4'd3, 4'd3, 4'd5};
        s.s4_t   = {4'd8, 4'd1, 4'd2, 4'd3, 4'd3, 4'd2, 4'd1, 4'd8};
        s.s4_opb = 8'b1111_0000;
      end
      30: begin
        s.lat = 8'd18; s.s1_sol = 2'd2; s.s1_t0 = 4'd1; s.s2_t0 = 4'd3; s.s3_sol = 2'd3;
        s.s3_t   = {4'd7, 4'd1, 4'd2, 4'd8, 4'd6, 4'd4, 4'd3, 4'd5};
        s.s4_t   = {4'd1, 4'd8, 4'd3, 4'd3, 4'd4, 4'd2, 4'd2, 4'd1};
        s.s4_opb = 8'b1110_0100;   // second operator: Y2, Y5, Y6, Y7
      end
      default: begin   // 12
        s.lat = 8'd21; s.s1_sol = 2'd3; s.s1_t0 = 4'd1; s.s2_t0 = 4'd3; s.s3_sol = 2'd3;
        s.s3_t   = {4'd2, 4'd4, 4'd5, 4'd1, 4'd7, 4'd3, 4'd8, 4'd6};
        s.s4_t   = {4'd4, 4'd5, 4'd6, 4'd7, 4'd7, 4'd6, 4'd5, 4'd4};
        s.s4_opb = 8'b1111_0000;
      end
    endcase
    return s;
  endfunction

  // Count i steps after count c, wrapping 8 -> 1.
  function automatic cnt8_t cnt_add(input cnt8_t c, input int i);
    return cnt8_t'(((int'(c) - 1 + i) % N) + 1);
  endfunction

  // Single-block timetable of a 2D architecture whose 1D passes have
  // latency LAT (cycle 0 = start cycle). For ARCH 12 (LAT 21): first-pass
  // writes 21..84, reads 85..148, second pass from 86, output 107..170.
  function automatic int c1_last  (input int lat); return lat + NN - 1;       endfunction
  function automatic int wr_first (input int lat); return lat;                endfunction
  function automatic int wr_last  (input int lat); return lat + NN - 1;       endfunction
  function automatic int rd_first (input int lat); return lat + NN;           endfunction
  function automatic int rd_last  (input int lat); return lat + 2 * NN - 1;   endfunction
  function automatic int c2_first (input int lat); return lat + NN + 1;       endfunction
  function automatic int out_first(input int lat); return 2 * lat + NN + 1;   endfunction
  function automatic int out_last (input int lat); return 2 * lat + 2 * NN;   endfunction

  // Width of the cycle counters (enough for every architecture).
  localparam int unsigned NCYC_W = 8;

endpackage
