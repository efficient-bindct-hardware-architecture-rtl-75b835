// bindct_cycle_ctrl: the "Cntr-N-Cycle" counter of the 2D BinDCT.
//
// The 2D transform of one 8x8 block follows a fixed timetable, so cycle
// counting replaces a state machine, as in the document. A block starts
// with `start` in the cycle its first sample is on the input (cycle 0).
// From the cycle count of each block in flight the controller decodes
//   en1     cycles   0..84   run cntr8-1 and shift input block 1
//   we      cycles  21..84   write the first pass's serial results
//   re      cycles  85..148  read the transpose memory column by column
//   en2     cycles  86..170  run cntr8-2 and shift input block 2
//   out_rdy cycles 107..170  a 2D coefficient is on the output
// These are the bounds for the default pass latency LAT = 21; in general
// they are the timetable functions of bindct_pkg (we from LAT, re from
// LAT+64, en2 from LAT+65, out_rdy from 2*LAT+65). The second pass starts
// only after the last first-pass result of its block has been written, as
// the document describes.
//
// CONTINUOUS = 0 (the document's main case, one block at a time): a start
// is accepted only when no block is in flight.
// CONTINUOUS = 1 (the document's continuous mode, which needs the double
// transpose memory): a start is also accepted exactly 64 cycles after the
// previous one, so blocks stream back to back and both cntr8s keep their
// phase, or once the previous block is at least 86 cycles old, so that
// each cntr8 sees a gap and restarts from 0. Up to three blocks are then in
// flight; each has its own cycle count and the windows are ORed. These
// acceptance rules are this design's choice. `ready` tells whether a start
// would be accepted in the current cycle; other starts are ignored.
//
// Timing: the outputs are combinational from the registered counts and
// from an accepted `start` (for cycle 0).
module bindct_cycle_ctrl
  import bindct_pkg::*;
#(
  parameter bit          CONTINUOUS = 1'b0,
  parameter int unsigned LAT        = 21     // 1D pass latency
)(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic ready,     // a start in this cycle would be accepted
  output logic busy,      // at least one block is in flight (cycles 1..170)
  output logic en1,
  output logic we,
  output logic re,
  output logic en2,
  output logic out_rdy
);

  localparam int unsigned SLOTS = CONTINUOUS ? 3 : 1;
  localparam int unsigned C1_LAST   = c1_last(LAT);
  localparam int unsigned WR_FIRST  = wr_first(LAT);
  localparam int unsigned WR_LAST   = wr_last(LAT);
  localparam int unsigned RD_FIRST  = rd_first(LAT);
  localparam int unsigned RD_LAST   = rd_last(LAT);
  localparam int unsigned C2_FIRST  = c2_first(LAT);
  localparam int unsigned OUT_FIRST = out_first(LAT);
  localparam int unsigned OUT_LAST  = out_last(LAT);
  localparam int unsigned GAP       = C2_FIRST;   // 86: youngest age that lets both cntr8s restart

  typedef logic [NCYC_W-1:0] ncyc_t;

  logic              vld [SLOTS];
  ncyc_t             age [SLOTS];    // cycles since that block's start
  ncyc_t             last_age;       // cycles since the latest accepted start (saturating)
  logic              accept;
  logic [1:0]        free_slot;   // lowest free slot
  logic              have_free;

  function automatic logic in_win(ncyc_t c, ncyc_t lo, ncyc_t hi);
    return (c >= lo) && (c <= hi);
  endfunction

  always_comb begin
    busy      = 1'b0;
    have_free = 1'b0;
    free_slot = '0;
    for (int i = SLOTS - 1; i >= 0; i--) begin
      if (vld[i]) busy = 1'b1;
      else begin
        have_free = 1'b1;
        free_slot = 2'(i);
      end
    end
    if (!busy)
      ready = 1'b1;
    else if (CONTINUOUS)
      ready = have_free && ((last_age == ncyc_t'(NN)) || (last_age >= ncyc_t'(GAP)));
    else
      ready = 1'b0;
    accept = start && ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < SLOTS; i++) begin
        vld[i] <= 1'b0;
        age[i] <= '0;
      end
      last_age <= '1;
    end else begin
      for (int i = 0; i < SLOTS; i++) begin
        if (accept && free_slot == 2'(i)) begin
          vld[i] <= 1'b1;
          age[i] <= ncyc_t'(1);
        end else if (vld[i]) begin
          if (age[i] == ncyc_t'(OUT_LAST)) begin
            vld[i] <= 1'b0;
            age[i] <= '0;
          end else begin
            age[i] <= age[i] + 1'b1;
          end
        end
      end
      if (accept) begin
        last_age <= ncyc_t'(1);
      end else if (last_age != '1) begin
        last_age <= last_age + 1'b1;
      end
    end
  end

  always_comb begin
    en1     = accept;     // cycle 0 of a new block
    we      = 1'b0;
    re      = 1'b0;
    en2     = 1'b0;
    out_rdy = 1'b0;
    for (int i = 0; i < SLOTS; i++) begin
      if (vld[i]) begin
        en1     |= in_win(age[i], '0, ncyc_t'(C1_LAST));
        we      |= in_win(age[i], ncyc_t'(WR_FIRST), ncyc_t'(WR_LAST));
        re      |= in_win(age[i], ncyc_t'(RD_FIRST), ncyc_t'(RD_LAST));
        en2     |= in_win(age[i], ncyc_t'(C2_FIRST), ncyc_t'(OUT_LAST));
        out_rdy |= in_win(age[i], ncyc_t'(OUT_FIRST), ncyc_t'(OUT_LAST));
      end
    end
  end

  // No two blocks may drive the same window at once except where the
  // windows chain seamlessly (back-to-back blocks): at most one block is
  // ever in its output window.
  always_comb begin
    int n_out;
    n_out = 0;
    for (int i = 0; i < SLOTS; i++)
      if (vld[i] && in_win(age[i], ncyc_t'(OUT_FIRST), ncyc_t'(OUT_LAST))) n_out++;
    if (rst_n) assert (n_out <= 1);
  end

endmodule
