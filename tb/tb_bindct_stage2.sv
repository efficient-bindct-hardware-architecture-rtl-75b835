// tb_bindct_stage2: random a5/a6 pairs are applied for a period of counts
// 1..8. The lifting results must appear in the document's order: Z1
// right after count 5 and Z2 right after count 6 (Z1 unchanged by then),
// both holding to the end of the period; the four-step chain takes four
// cycles (counts 3..6).
module tb_bindct_stage2;
  import bindct_pkg::*;
  import bindct_ref_pkg::*;

  localparam int W = 9;
  localparam int LINES = 60;

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  cnt8_t               cnt = '0;
  logic signed [W-1:0] a5 = '0, a6 = '0;
  logic signed [W:0]   z1, z2;
  int                  checks = 0, failures = 0;

  bindct_stage2 #(.W(W)) dut (.clk, .rst_n, .cnt, .a5, .a6, .z1, .z2);

  always #5 clk = ~clk;

  initial begin
    repeat (6000) @(posedge clk);
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

  initial begin
    int ea5, ea6, ez0, eh, ez1, ez2, pz1, pz2;
    pz1 = 0; pz2 = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < LINES; n++) begin
      ea5 = rnd_s(W);
      ea6 = rnd_s(W);
      a5 = W'(ea5);
      a6 = W'(ea6);
      ez0 = ea5 - (ea6 >>> 1);
      eh  = ea6 + (ez0 >>> 1);
      ez1 = eh + (ez0 >>> 2);
      ez2 = (ez1 >>> 1) - ez0;
      for (int k = 1; k <= 8; k++) begin
        cnt = cnt8_t'(k);
        @(negedge clk);
        if (k == 4 && n > 0) begin
          chk("z1 held before count 5", int'(z1), pz1);
          chk("z2 held before count 6", int'(z2), pz2);
        end
        if (k == 5) chk($sformatf("line %0d Z1 after count 5", n), int'(z1), ez1);
        if (k == 6) chk($sformatf("line %0d Z2 after count 6", n), int'(z2), ez2);
        if (k == 8) begin
          chk("Z1 end", int'(z1), ez1);
          chk("Z2 end", int'(z2), ez2);
        end
      end
      pz1 = ez1; pz2 = ez2;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
