// tb_bindct_transpose_pingpong: streams four random 8x8 blocks through
// the double transpose memory the way the continuous 2D design does:
// block b is written row by row in the same 64 cycles in which block b-1
// is read column by column. Every read must return element
// (row r%8, column r/8) of its own block, one cycle after the read enable,
// although the other bank is being overwritten at the same time.
module tb_bindct_transpose_pingpong;
  import bindct_pkg::*;
  import bindct_ref_pkg::*;

  localparam int W = 12;
  localparam int BLOCKS = 4;

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  logic                we = 1'b0, re = 1'b0;
  logic signed [W-1:0] wdata = '0;
  logic signed [W-1:0] rdata;
  int                  checks = 0, failures = 0;
  int                  m [BLOCKS][8][8];

  bindct_transpose_pingpong #(.W(W)) dut (.clk, .rst_n, .we, .wdata, .re, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < BLOCKS; b++)
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) m[b][r][c] = rnd_s(W);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // phase p: write block p (if any) and read block p-1 (if any)
    for (int p = 0; p <= BLOCKS; p++) begin
      for (int i = 0; i < 64; i++) begin
        we    = (p < BLOCKS);
        wdata = (p < BLOCKS) ? W'(m[p][i / 8][i % 8]) : '0;
        re    = (p > 0);
        @(negedge clk);
        if (p > 0) begin
          checks++;
          if (int'(rdata) != m[p-1][i % 8][i / 8]) begin
            failures++;
            $display("block %0d read %0d: got %0d expected %0d", p - 1, i, rdata, m[p-1][i % 8][i / 8]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
