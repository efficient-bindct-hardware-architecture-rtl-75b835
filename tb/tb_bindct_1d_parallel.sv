// tb_bindct_1d_parallel: the 8-point pass as a stand-alone transform with
// eight parallel inputs and outputs, i.e. without the serial input block
// and serializer, built as ARCH 22 for input word lengths of 12 and 16 bits.
//
// A model cntr8 runs 1..8 and a new random line (extremes included) is put
// on both instances' inputs at every count 8, so one line enters every 8
// cycles. With the ARCH 22 schedule, Y0/Y7 are written 16 cycles after a
// line's first sample would have entered an input block, Y1/Y6 17, Y2/Y5 18
// and Y3/Y4 19 cycles after it, and each holds for 8 cycles. So all eight
// outputs of a line are valid together in cycles 20..24 after it, which is
// where a parallel consumer would take them. The testbench compares all
// eight outputs with the integer reference in each of those five cycles,
// and counts the lines for which every check ran: 8 results per 8 cycles.
module tb_bindct_1d_parallel;
  import bindct_pkg::*;
  import bindct_ref_pkg::*;

  localparam int LINES = 60;
  localparam int OK_FIRST = 20;   // all outputs of a line valid (ARCH 22)
  localparam int OK_LAST  = 24;

  logic               clk = 1'b0;
  logic               rst_n = 1'b0;
  cnt8_t              cnt = '0;
  logic signed [11:0] x12 [N];
  logic signed [15:0] y12 [N];
  logic signed [15:0] x16 [N];
  logic signed [19:0] y16 [N];
  int                 checks = 0, failures = 0;

  bindct_1d #(.W(12), .ARCH(22)) dut12 (.clk, .rst_n, .cnt, .x(x12), .y(y12));
  bindct_1d #(.W(16), .ARCH(22)) dut16 (.clk, .rst_n, .cnt, .x(x16), .y(y16));

  always #5 clk = ~clk;

  initial begin
    repeat (LINES * 8 + 200) @(posedge clk);
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

  int in12 [LINES][8];
  int in16 [LINES][8];
  int e12  [LINES][8];
  int e16  [LINES][8];
  int held12 [LINES];   // outputs of a line checked over their whole hold window
  int held16 [LINES];

  // Cycle `cur` counts from count 1 of period 0. Line n is loaded at the
  // end of cycle 8n-1, so its first sample would have entered at 8n-9.
  task automatic chk_line(input int cur);
    for (int r = OK_FIRST; r <= OK_LAST; r++) begin
      int t;
      t = cur + 9 - r;
      if (t >= 0 && t % 8 == 0 && t / 8 < LINES) begin
        for (int k = 0; k < N; k++) begin
          chk($sformatf("L=12 line %0d Y%0d", t / 8, k), int'(y12[k]), e12[t / 8][k]);
          chk($sformatf("L=16 line %0d Y%0d", t / 8, k), int'(y16[k]), e16[t / 8][k]);
          held12[t / 8]++;
          held16[t / 8]++;
        end
      end
    end
  endtask

  initial begin
    vec8_t  v;
    ref1d_t r;
    int lines12, lines16;
    for (int n = 0; n < LINES; n++) begin
      for (int i = 0; i < 8; i++) v[i] = rnd_s(12);
      for (int i = 0; i < 8; i++) in12[n][i] = v[i];
      r = ref_1d(v);
      for (int k = 0; k < 8; k++) e12[n][k] = r.y[k];
      for (int i = 0; i < 8; i++) v[i] = rnd_s(16);
      for (int i = 0; i < 8; i++) in16[n][i] = v[i];
      r = ref_1d(v);
      for (int k = 0; k < 8; k++) e16[n][k] = r.y[k];
    end
    for (int i = 0; i < N; i++) begin
      x12[i] = 12'(in12[0][i]);
      x16[i] = 16'(in16[0][i]);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < LINES + 3; p++) begin
      for (int k = 1; k <= 8; k++) begin
        cnt = cnt8_t'(k);
        @(negedge clk);
        chk_line(p * 8 + k);
        if (k == 8 && p + 1 < LINES) begin
          for (int i = 0; i < N; i++) begin
            x12[i] = 12'(in12[p + 1][i]);
            x16[i] = 16'(in16[p + 1][i]);
          end
        end
      end
    end
    lines12 = 0;
    lines16 = 0;
    for (int n = 0; n < LINES; n++) begin
      if (held12[n] == 8 * (OK_LAST - OK_FIRST + 1)) lines12++;
      if (held16[n] == 8 * (OK_LAST - OK_FIRST + 1)) lines16++;
    end
    chk("L=12 lines with all 8 outputs checked in all 5 cycles", lines12, LINES);
    chk("L=16 lines with all 8 outputs checked in all 5 cycles", lines16, LINES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
