// tb_bindct_2d_stream: the 2D BinDCT in continuous mode (CONTINUOUS = 1).
//
// Sends bursts of back-to-back 8x8 blocks (a new start every 64 cycles,
// an unbroken sample stream), then a block that starts after the smallest
// allowed gap (86 cycles after the previous start), then a second burst,
// and sprinkles starts at forbidden moments that must be ignored. Every
// accepted block's 64 coefficients must appear exactly in cycles 107..170
// after its start, equal to the integer reference. A burst of B blocks must
// give 64*B coefficients on consecutive cycles: one per clock, the
// throughput the document claims for this mode. Counted mechanisms, each
// of which must occur: back-to-back starts, gap restarts, ignored starts,
// cycles in which one transpose bank is written while the other is read,
// and write-bank switches.
module tb_bindct_2d_stream;
  import bindct_pkg::*;
  import bindct_ref_pkg::*;

  localparam int NBLK = 8;

  logic                    clk = 1'b0;
  logic                    rst_n = 1'b0;
  logic                    start = 1'b0;
  logic signed [IN_W-1:0]  xin = '0;
  logic                    ready, busy, out_rdy;
  logic signed [OUT_W-1:0] yout;
  int                      checks = 0, failures = 0;

  bindct_2d #(.CONTINUOUS(1'b1)) dut (.clk, .rst_n, .start, .xin, .ready, .busy, .out_rdy, .yout);

  always #5 clk = ~clk;

  initial begin
    repeat (4000) @(posedge clk);
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

  // Schedule: start cycle of each block, relative to the first.
  // Blocks 0..3: back to back; block 4: 86 after block 3; block 5: 64 later;
  // blocks 6, 7: after an idle gap, back to back.
  int start_at [NBLK] = '{0, 64, 128, 192, 278, 342, 600, 664};
  // Forbidden starts (must be ignored): too early after a start.
  int bad_at [4] = '{30, 200, 300, 610};

  mat8_t blk [NBLK];
  mat8_t ref_c [NBLK];
  int    exp_time [$];
  int    exp_val  [$];
  int    n_b2b = 0, n_gap = 0, n_ignored = 0, n_rw = 0, n_bank_sw = 0;
  int    run = 0, max_run = 0, n_out = 0;
  int    cyc = -1;

  always @(posedge clk) if (rst_n) begin
    if (dut.we && dut.re) n_rw++;
    if (dut.g_pingpong.u_tram.we && dut.g_pingpong.u_tram.wcnt == 6'd63) n_bank_sw++;
  end

  initial begin
    for (int b = 0; b < NBLK; b++) begin
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) blk[b][r][c] = (b == 1) ? 55 : rnd_s(IN_W);
      ref_c[b] = ref_2d(blk[b]);
      for (int k = 0; k < 64; k++) begin
        exp_time.push_back(start_at[b] + out_first(21) + k);
        exp_val.push_back(ref_c[b][k % 8][k / 8]);
      end
    end
    chk("DC-only reference for a flat block", ref_c[1][0][0], 64 * 55);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    for (cyc = 0; cyc < start_at[NBLK-1] + 200; cyc++) begin
      int b_now, b_in;
      bit is_bad;
      b_now = -1; b_in = -1; is_bad = 0;
      for (int b = 0; b < NBLK; b++) begin
        if (cyc == start_at[b]) b_now = b;
        if (cyc >= start_at[b] && cyc < start_at[b] + 64) b_in = b;
      end
      foreach (bad_at[i]) if (cyc == bad_at[i]) is_bad = 1;
      start = (b_now >= 0) || is_bad;
      xin   = (b_in >= 0) ? IN_W'(blk[b_in][(cyc - start_at[b_in]) / 8][(cyc - start_at[b_in]) % 8]) : '0;
      #1;
      if (b_now >= 0) begin
        chk($sformatf("block %0d start accepted", b_now), int'(ready), 1);
        if (b_now > 0 && start_at[b_now] - start_at[b_now-1] == 64) n_b2b++;
        if (b_now > 0 && start_at[b_now] - start_at[b_now-1] == 86) n_gap++;
      end
      if (is_bad) begin
        chk($sformatf("start at %0d refused", cyc), int'(ready), 0);
        n_ignored++;
      end
      if (out_rdy) begin
        n_out++;
        run++;
        if (run > max_run) max_run = run;
        if (exp_time.size() == 0) begin
          chk("unexpected output", 1, 0);
        end else begin
          chk($sformatf("output time (coefficient %0d)", n_out - 1), cyc, exp_time[0]);
          chk($sformatf("output value (coefficient %0d)", n_out - 1), int'(yout), exp_val[0]);
          void'(exp_time.pop_front());
          void'(exp_val.pop_front());
        end
      end else begin
        run = 0;
        if (exp_time.size() > 0 && exp_time[0] == cyc) chk("missing output", 0, 1);
      end
      @(negedge clk);
    end
    chk("all coefficients delivered", exp_time.size(), 0);
    chk("coefficients seen", n_out, 64 * NBLK);
    chk("one coefficient per cycle over a 4-block burst", int'(max_run >= 4 * 64), 1);
    chk("mechanism: back-to-back starts", int'(n_b2b > 0), 1);
    chk("mechanism: restart after a gap", int'(n_gap > 0), 1);
    chk("mechanism: ignored starts", int'(n_ignored > 0), 1);
    chk("mechanism: write one bank while reading the other", int'(n_rw > 0), 1);
    chk("mechanism: write-bank switches", n_bank_sw, NBLK);
    $display("mechanisms: back-to-back %0d, gap restarts %0d, ignored %0d, read+write cycles %0d, bank switches %0d, longest output run %0d",
             n_b2b, n_gap, n_ignored, n_rw, n_bank_sw, max_run);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
