// tb_bindct_2d_arch: end-to-end test of the 2D BinDCT built as each of the
// four architectures (ARCH 12, 30, 22, 7), in single-block mode, and of
// ARCH 22 and 7 in continuous mode.
//
// All six instances see the same input stream. Starts come at cycles 0,
// 200, 400, then every 64 cycles from 600 to 1048 (8 back-to-back blocks),
// with a new block of samples (random, extremes and patterns) after each
// start. Each instance accepts the starts its `ready` allows; a monitor per
// instance queues the accepted blocks and checks every coefficient against
// the integer reference 2D transform, in the design's column-by-column
// output order, and checks the cycle it appears in: start + F + k for
// output k, where F = 107, 101, 99, 97 for ARCH 12, 30, 22, 7. The
// single-block instances must refuse the starts that fall while they are
// busy; the continuous instances must accept all 11 and produce 512
// coefficients on consecutive cycles.
module tb_bindct_2d_arch;
  import bindct_pkg::*;
  import bindct_ref_pkg::*;

  localparam int NI     = 6;
  localparam int NSTART = 11;
  localparam int ARCHS [NI] = '{12, 30, 22, 7, 22, 7};
  localparam bit CONTS [NI] = '{0, 0, 0, 0, 1, 1};
  localparam int FIRST [NI] = '{107, 101, 99, 97, 99, 97};

  logic                    clk = 1'b0;
  logic                    rst_n = 1'b0;
  logic                    start = 1'b0;
  logic signed [IN_W-1:0]  xin = '0;
  int                      cyc = -1;     // cycle count, 0 = first start
  int                      checks = 0, failures = 0;

  logic                    ready   [NI];
  logic                    busy    [NI];
  logic                    out_rdy [NI];
  logic signed [OUT_W-1:0] yout    [NI];

  for (genvar i = 0; i < NI; i++) begin : g_dut
    bindct_2d #(.CONTINUOUS(CONTS[i]), .ARCH(ARCHS[i])) dut (
      .clk, .rst_n, .start, .xin,
      .ready(ready[i]), .busy(busy[i]), .out_rdy(out_rdy[i]), .yout(yout[i]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
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

  int    start_at [NSTART] = '{0, 200, 400, 600, 664, 728, 792, 856, 920, 984, 1048};
  mat8_t blk      [NSTART];
  mat8_t exp_blk  [NSTART];

  // Per-instance bookkeeping.
  int q_blk   [NI][$];   // accepted blocks, oldest first
  int q_time  [NI][$];   // their start cycles
  int n_acc   [NI];
  int n_out   [NI];
  int k_out   [NI];      // coefficient index within the oldest block
  int run     [NI];      // current run of consecutive output cycles
  int max_run [NI];
  int cur_blk;           // block whose samples are on xin, -1 none

  always @(posedge clk) if (rst_n && cyc >= 0) begin
    for (int i = 0; i < NI; i++) begin
      if (start && !ready[i]) chk($sformatf("instance %0d busy when refusing", i), int'(busy[i]), 1);
      if (start && ready[i]) begin
        q_blk[i].push_back(cur_blk);
        q_time[i].push_back(cyc);
        n_acc[i]++;
      end
      if (out_rdy[i]) begin
        run[i]++;
        if (run[i] > max_run[i]) max_run[i] = run[i];
        if (q_blk[i].size() == 0) begin
          chk($sformatf("instance %0d output without a block", i), 0, 1);
        end else begin
          int b, k;
          b = q_blk[i][0];
          k = k_out[i];
          chk($sformatf("instance %0d block %0d coef %0d", i, b, k),
              int'(yout[i]), exp_blk[b][k % 8][k / 8]);
          chk($sformatf("instance %0d block %0d coef %0d cycle", i, b, k),
              cyc, q_time[i][0] + FIRST[i] + k);
          n_out[i]++;
          k_out[i]++;
          if (k_out[i] == NN) begin
            k_out[i] = 0;
            void'(q_blk[i].pop_front());
            void'(q_time[i].pop_front());
          end
        end
      end else begin
        run[i] = 0;
      end
    end
  end

  function automatic mat8_t make_block(input int kind);
    mat8_t m;
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++)
        unique case (kind)
          0: m[r][c] = -128;
          1: m[r][c] = ((r + c) % 2 == 0) ? 127 : -128;
          2: m[r][c] = (r < 4) ? 127 : -128;
          default: m[r][c] = rnd_s(IN_W);
        endcase
    return m;
  endfunction

  initial begin
    int s;
    for (int b = 0; b < NSTART; b++) begin
      blk[b]     = make_block(b);
      exp_blk[b] = ref_2d(blk[b]);
    end
    cur_blk = -1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    s = 0;
    for (int c = 0; c < 1500; c++) begin
      cyc = c;
      if (s < NSTART && c == start_at[s]) begin
        cur_blk = s;
        s++;
      end
      start = (cur_blk >= 0) && (c == start_at[cur_blk]);
      xin   = (cur_blk >= 0 && c - start_at[cur_blk] < NN)
              ? IN_W'(blk[cur_blk][(c - start_at[cur_blk]) / 8][(c - start_at[cur_blk]) % 8])
              : IN_W'(0);
      @(negedge clk);
    end
    start = 1'b0;
    for (int i = 0; i < 4; i++) begin
      // single-block mode: 0, 200, 400, 600 accepted, then the first start
      // at least 171 cycles after 600 (792) and after that (984)
      chk($sformatf("instance %0d accepted starts", i), n_acc[i], 6);
      chk($sformatf("instance %0d coefficients", i), n_out[i], 6 * NN);
    end
    for (int i = 4; i < NI; i++) begin
      chk($sformatf("instance %0d accepted starts", i), n_acc[i], NSTART);
      chk($sformatf("instance %0d coefficients", i), n_out[i], NSTART * NN);
      chk($sformatf("instance %0d unbroken output run", i), max_run[i], 8 * NN);
    end
    for (int i = 0; i < NI; i++) chk($sformatf("instance %0d nothing pending", i), q_blk[i].size(), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
