// tb_bindct_input_block: streams random lines into the input block with
// a model cntr8 (0..8, then 1..8) and checks that after every count-8
// cycle the X registers hold the eight samples of the line just received,
// x0 in X0, and that they hold still for the next eight cycles.
module tb_bindct_input_block;
  import bindct_pkg::*;
  import bindct_ref_pkg::*;

  localparam int W = 8;
  localparam int LINES = 12;

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  logic                en = 1'b0;
  cnt8_t               cnt = '0;
  logic signed [W-1:0] xin = '0;
  logic signed [W-1:0] x [N];
  int                  checks = 0, failures = 0;
  int                  lines [LINES][8];

  bindct_input_block #(.W(W)) dut (.clk, .rst_n, .en, .cnt, .xin, .x);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_line(input int n);
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (int'(x[i]) != lines[n][i]) begin
        failures++;
        $display("line %0d X%0d: got %0d expected %0d", n, i, x[i], lines[n][i]);
      end
    end
  endtask

  initial begin
    for (int n = 0; n < LINES; n++)
      for (int i = 0; i < 8; i++) lines[n][i] = rnd_s(W);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    en = 1'b1;
    // sample s of the stream is presented at cycle s; the count is 0 in
    // cycle 0 and ((c-1)%8)+1 afterwards.
    for (int c = 0; c < LINES * 8 + 9; c++) begin
      cnt = cnt8_t'(c == 0 ? 0 : ((c - 1) % 8) + 1);
      xin = (c < LINES * 8) ? W'(lines[c / 8][c % 8]) : '0;
      @(negedge clk);
      // after a count-8 cycle c = 8 + 8n, line n must be in the X registers
      if (c >= 8 && (c - 8) % 8 == 0 && (c - 8) / 8 < LINES) check_line((c - 8) / 8);
      // one cycle before the next load they must still hold it
      if (c >= 15 && (c - 15) % 8 == 0 && (c - 15) / 8 < LINES) check_line((c - 15) / 8);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
