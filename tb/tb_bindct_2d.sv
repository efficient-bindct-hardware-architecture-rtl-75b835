// tb_bindct_2d: end-to-end test of the 2D BinDCT at its only (default)
// configuration.
//
// It sends a sequence of 8x8 blocks, each as 64 samples on consecutive
// cycles from the start cycle, and collects the 64 coefficients while
// out_rdy is high. Every coefficient is compared with an integer
// reference 2D transform (rows, then columns) in the design's output order
// (column by column). Checked as well:
//   - latency: first coefficient in cycle 107, last in cycle 170 after
//     start, one per cycle with no gap;
//   - a constant block gives only the DC term, 64 times the constant;
//   - a start while busy is ignored, and a block may start in the first
//     cycle after busy falls (back to back);
//   - three consecutive blocks, as for the Y, Cb and Cr blocks of a
//     colour layout descriptor.
// The mechanisms are counted and each must occur: 9-cycle first-line
// loads, 8-cycle reloads of the input registers in both passes, the
// count-8 -> 1 reload of both cntr8s, column-order reads of the transpose
// memory and ignored starts.
module tb_bindct_2d;
  import bindct_pkg::*;
  import bindct_ref_pkg::*;

  localparam int BLOCKS = 9;

  logic                    clk = 1'b0;
  logic                    rst_n = 1'b0;
  logic                    start = 1'b0;
  logic signed [IN_W-1:0]  xin = '0;
  logic                    ready, busy, out_rdy;
  logic signed [OUT_W-1:0] yout;
  int                      checks = 0, failures = 0;

  bindct_2d dut (.clk, .rst_n, .start, .xin, .ready, .busy, .out_rdy, .yout);

  always #5 clk = ~clk;

  initial begin
    repeat (BLOCKS * 200 + 500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Mechanism counters, sampled on the design's own control signals.
  int n_first_load = 0, n_reload1 = 0, n_reload2 = 0, n_cnt_wrap1 = 0, n_cnt_wrap2 = 0;
  int n_reads = 0, n_ignored_start = 0, n_back_to_back = 0, n_dc_blocks = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.en1 && dut.cnt1 == 4'd8 && dut.u_ctrl.age[0] == NCYC_W'(8)) n_first_load++;
    if (dut.en1 && dut.cnt1 == 4'd8 && dut.u_ctrl.age[0] != NCYC_W'(8)) n_reload1++;
    if (dut.en2 && dut.cnt2 == 4'd8) n_reload2++;
    if (dut.en1 && dut.cnt1 == 4'd8) n_cnt_wrap1++;
    if (dut.en2 && dut.cnt2 == 4'd8) n_cnt_wrap2++;
    if (dut.re) n_reads++;
    if (start && busy) n_ignored_start++;
  end

  mat8_t blk [BLOCKS];

  function automatic mat8_t make_block(input int kind);
    mat8_t m;
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++)
        unique case (kind)
          0: m[r][c] = 37;                                  // constant
          1: m[r][c] = -128;                                // most negative
          2: m[r][c] = 127;                                 // most positive
          3: m[r][c] = ((r + c) % 2 == 0) ? 127 : -128;     // checkerboard
          4: m[r][c] = (c < 4) ? -128 : 127;                // vertical edge
          default: m[r][c] = rnd_s(IN_W);
        endcase
    return m;
  endfunction

  // Send block b starting now (start high in this cycle) and check its
  // output; returns at the cycle after the last coefficient.
  task automatic run_block(input int b, input bit poke_start);
    mat8_t e;
    int c, got;
    int first, last;
    e = ref_2d(blk[b]);
    got = 0; first = -1; last = -1;
    for (c = 0; c < 200; c++) begin
      start = (c == 0) || (poke_start && c == 60);
      xin   = (c < 64) ? IN_W'(blk[b][c / 8][c % 8]) : IN_W'(0);
      #1;
      if (out_rdy) begin
        if (first < 0) first = c;
        last = c;
        if (got < 64)
          chk($sformatf("block %0d coef (%0d,%0d)", b, got % 8, got / 8), int'(yout), e[got % 8][got / 8]);
        got++;
      end
      @(negedge clk);
      if (c > 0 && !busy) break;
    end
    start = 1'b0;
    chk($sformatf("block %0d coefficient count", b), got, 64);
    chk($sformatf("block %0d first output cycle", b), first, 107);
    chk($sformatf("block %0d last output cycle", b), last, 170);
    if (b == 0) begin
      // constant block: DC only
      bit dc_ok;
      dc_ok = (e[0][0] == 64 * 37);
      for (int r = 0; r < 8; r++) for (int q = 0; q < 8; q++)
        if ((r != 0 || q != 0) && e[r][q] != 0) dc_ok = 0;
      chk("constant block gives DC only (reference)", int'(dc_ok), 1);
      n_dc_blocks++;
    end
  endtask

  initial begin
    for (int b = 0; b < BLOCKS; b++) blk[b] = make_block(b);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    for (int b = 0; b < BLOCKS; b++) begin
      run_block(b, b == 5);
      if (b == 2 || b == 6) repeat (4) @(negedge clk);   // idle gaps
      else n_back_to_back++;                             // start right away
    end
    chk("mechanism: first-line load after 9 cycles", int'(n_first_load > 0), 1);
    chk("mechanism: 9-cycle loads, one per block", n_first_load, BLOCKS);
    chk("mechanism: 8-cycle reloads in pass 1", int'(n_reload1 > 0), 1);
    chk("mechanism: 8-cycle reloads in pass 2", int'(n_reload2 > 0), 1);
    chk("mechanism: cntr8-1 reload to 1", int'(n_cnt_wrap1 > 0), 1);
    chk("mechanism: cntr8-2 reload to 1", int'(n_cnt_wrap2 > 0), 1);
    chk("mechanism: transposed reads", n_reads, 64 * BLOCKS);
    chk("mechanism: start ignored while busy", int'(n_ignored_start > 0), 1);
    chk("mechanism: back-to-back blocks", int'(n_back_to_back > 0), 1);
    chk("mechanism: DC-only block", int'(n_dc_blocks > 0), 1);
    $display("mechanisms: first loads %0d, reloads %0d/%0d, cntr wraps %0d/%0d, reads %0d, ignored starts %0d, back-to-back %0d",
             n_first_load, n_reload1, n_reload2, n_cnt_wrap1, n_cnt_wrap2, n_reads, n_ignored_start, n_back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
