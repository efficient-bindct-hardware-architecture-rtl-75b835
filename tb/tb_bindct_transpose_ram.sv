// tb_bindct_transpose_ram: writes three random 8x8 blocks row by row and
// reads each back column by column, back to back as the 2D design does.
// Read number r must return element (row r%8, column r/8) of the block one
// cycle after the read enable. Idle cycles between accesses must not move
// the pointers.
module tb_bindct_transpose_ram;
  import bindct_pkg::*;
  import bindct_ref_pkg::*;

  localparam int W = 12;
  localparam int BLOCKS = 3;

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  logic                we = 1'b0, re = 1'b0;
  logic signed [W-1:0] wdata = '0;
  logic signed [W-1:0] rdata;
  int                  checks = 0, failures = 0;

  bindct_transpose_ram #(.W(W)) dut (.clk, .rst_n, .we, .wdata, .re, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m [8][8];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int blk = 0; blk < BLOCKS; blk++) begin
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) m[r][c] = rnd_s(W);
      for (int i = 0; i < 64; i++) begin
        we = 1'b1;
        wdata = W'(m[i / 8][i % 8]);
        @(negedge clk);
        if (blk == 1 && i == 20) begin   // a pause in the middle
          we = 1'b0;
          repeat (3) @(negedge clk);
        end
      end
      we = 1'b0;
      for (int i = 0; i < 64; i++) begin
        re = 1'b1;
        @(negedge clk);
        re = 1'b0;
        checks++;
        if (int'(rdata) != m[i % 8][i / 8]) begin
          failures++;
          $display("block %0d read %0d: got %0d expected %0d", blk, i, rdata, m[i % 8][i / 8]);
        end
        if (blk == 2 && i == 30) repeat (2) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
