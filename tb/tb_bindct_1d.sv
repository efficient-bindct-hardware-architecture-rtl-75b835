// tb_bindct_1d: one 1D pass at both widths the 2D design uses (8-bit in,
// 12-bit out, and 12-bit in, 16-bit out). A model cntr8 runs 1..8 and a
// new random line (extremes included) is loaded into x at every count 8,
// as the input block does. Each line's Y0..Y7 must equal the integer
// reference and appear on schedule: Y0/Y7 after count 4 of the second
// period after the load, Y1/Y6 after 5, Y2/Y5 after 6, Y3/Y4 after 7,
// i.e. a new line every 8 cycles with all stages overlapped.
// The four architectures (ARCH 12, 30, 22, 7) are also run side by side
// on the 8-bit lines. For each of them, every Yk must be correct in the
// cycle LAT+k after its line's first sample would have entered the input
// block, which is the cycle the serializer reads it (LAT = 21, 18, 17,
// 16). This checks the whole schedule table of each architecture,
// including that no result is overwritten before it is read.
module tb_bindct_1d;
  import bindct_pkg::*;
  import bindct_ref_pkg::*;

  localparam int LINES = 40;

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  cnt8_t                cnt = '0;
  logic signed [7:0]    xa [N];
  logic signed [11:0]   ya [N];
  logic signed [11:0]   xb [N];
  logic signed [15:0]   yb [N];
  int                   checks = 0, failures = 0;

  bindct_1d #(.W(8))  dut_a (.clk, .rst_n, .cnt, .x(xa), .y(ya));
  bindct_1d #(.W(12)) dut_b (.clk, .rst_n, .cnt, .x(xb), .y(yb));

  logic signed [11:0]   y30 [N];
  logic signed [11:0]   y22 [N];
  logic signed [11:0]   y7  [N];

  bindct_1d #(.W(8), .ARCH(30)) dut_30 (.clk, .rst_n, .cnt, .x(xa), .y(y30));
  bindct_1d #(.W(8), .ARCH(22)) dut_22 (.clk, .rst_n, .cnt, .x(xa), .y(y22));
  bindct_1d #(.W(8), .ARCH(7))  dut_7  (.clk, .rst_n, .cnt, .x(xa), .y(y7));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
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

  // expected outputs per line (declared below, used by chk_serial)
  int ea [LINES+2][8];
  int eb [LINES+2][8];
  int ina [LINES+2][8];
  int inb [LINES+2][8];

  // Cycle `cur` is counted from count 1 of period 0 (cycle 0). Line n is
  // loaded at the end of cycle 8n-1, i.e. its first sample entered at
  // cycle 8n-9, so Yk is read in cycle 8n-9+LAT+k.
  int n_serial [4];

  task automatic chk_serial(input string name, input int slot, input int lat,
                            input logic signed [11:0] y [N], input int cur);
    for (int k = 0; k < N; k++) begin
      int t;
      t = cur + 9 - lat - k;
      if (t >= 0 && t % 8 == 0 && t / 8 < LINES) begin
        n_serial[slot]++;
        chk($sformatf("%s Y%0d line %0d", name, k, t / 8), int'(y[k]), ea[t / 8][k]);
      end
    end
  endtask

  initial begin
    vec8_t va, vb;
    ref1d_t r;
    for (int i = 0; i < N; i++) begin xa[i] = '0; xb[i] = '0; end
    for (int n = 0; n < LINES + 2; n++) begin
      for (int i = 0; i < 8; i++) begin
        va[i] = rnd_s(8); vb[i] = rnd_s(12);
        ina[n][i] = va[i]; inb[n][i] = vb[i];
      end
      r = ref_1d(va); for (int k = 0; k < 8; k++) ea[n][k] = r.y[k];
      r = ref_1d(vb); for (int k = 0; k < 8; k++) eb[n][k] = r.y[k];
      if (n == 0) begin
        for (int i = 0; i < 8; i++) begin xa[i] = 8'(va[i]); xb[i] = 12'(vb[i]); end
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Period p (p = 0..LINES+1) runs counts 1..8; line p is in x during
    // period p, so its outputs are produced during period p+1.
    for (int p = 0; p <= LINES; p++) begin
      for (int k = 1; k <= 8; k++) begin
        cnt = cnt8_t'(k);
        @(negedge clk);
        // state seen during cycle p*8+k (the next one)
        chk_serial("ARCH 12", 0, 21, ya,  p * 8 + k);
        chk_serial("ARCH 30", 1, 18, y30, p * 8 + k);
        chk_serial("ARCH 22", 2, 17, y22, p * 8 + k);
        chk_serial("ARCH 7",  3, 16, y7,  p * 8 + k);
        if (p >= 1) begin
          int n;
          n = p - 1;
          unique case (k)
            4: begin chk("Y0", int'(ya[0]), ea[n][0]); chk("Y7", int'(ya[7]), ea[n][7]);
                     chk("Y0 w12", int'(yb[0]), eb[n][0]); chk("Y7 w12", int'(yb[7]), eb[n][7]); end
            5: begin chk("Y1", int'(ya[1]), ea[n][1]); chk("Y6", int'(ya[6]), ea[n][6]);
                     chk("Y1 w12", int'(yb[1]), eb[n][1]); chk("Y6 w12", int'(yb[6]), eb[n][6]); end
            6: begin chk("Y2", int'(ya[2]), ea[n][2]); chk("Y5", int'(ya[5]), ea[n][5]);
                     chk("Y2 w12", int'(yb[2]), eb[n][2]); chk("Y5 w12", int'(yb[5]), eb[n][5]); end
            7: begin chk("Y3", int'(ya[3]), ea[n][3]); chk("Y4", int'(ya[4]), ea[n][4]);
                     chk("Y3 w12", int'(yb[3]), eb[n][3]); chk("Y4 w12", int'(yb[4]), eb[n][4]); end
            default: ;
          endcase
        end
        if (k == 8 && p + 1 < LINES + 2) begin
          // load the next line, as the input block does at count 8
          for (int i = 0; i < 8; i++) begin
            xa[i] = 8'(ina[p+1][i]);
            xb[i] = 12'(inb[p+1][i]);
          end
        end
      end
    end
    for (int a = 0; a < 4; a++) chk($sformatf("serial reads of architecture %0d", a),
                                    int'(n_serial[a] >= 8 * (LINES - 3)), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
