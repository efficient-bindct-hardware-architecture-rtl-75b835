// tb_bindct_cntr8: checks the cntr8 sequence. With the enable held high
// the count must read 0 once, then 1..8 repeatedly; dropping the enable
// must return it to 0, and a new enable must start again from 0.
module tb_bindct_cntr8;
  import bindct_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  en = 1'b0;
  cnt8_t q;
  int    checks = 0, failures = 0;

  bindct_cntr8 dut (.clk, .rst_n, .en, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_q(input int e);
    checks++;
    if (int'(q) != e) begin
      failures++;
      $display("cntr8: got %0d expected %0d at %0t", q, e, $time);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    expect_q(0);
    for (int run = 0; run < 3; run++) begin
      int len;
      len = 9 + 8 * (run + 2) + run;   // stop at various phases
      en = 1'b1;
      for (int c = 0; c < len; c++) begin
        expect_q(c == 0 ? 0 : ((c - 1) % 8) + 1);
        @(negedge clk);
      end
      en = 1'b0;
      @(negedge clk);
      expect_q(0);
      @(negedge clk);
      expect_q(0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
