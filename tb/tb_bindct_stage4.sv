// tb_bindct_stage4: random b and d (11 bit) are applied for a period.
// The two operators must produce Y0 & Y7 after count 4, Y1 & Y6 after 5,
// Y2 & Y5 after 6 and Y3 & Y4 after 7 (four cycles), each equal to the
// reference lifting equations, and all eight must hold through count 3 of
// the next period.
module tb_bindct_stage4;
  import bindct_pkg::*;
  import bindct_ref_pkg::*;

  localparam int W = 11;
  localparam int LINES = 60;

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  cnt8_t               cnt = '0;
  logic signed [W-1:0] b [4];
  logic signed [W-1:0] d [4];
  logic signed [W:0]   y [N];
  int                  checks = 0, failures = 0;

  bindct_stage4 #(.W(W)) dut (.clk, .rst_n, .cnt, .b, .d, .y);

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
    int eb [4];
    int ed [4];
    int ey [8];
    int py [8];
    for (int i = 0; i < 4; i++) begin b[i] = '0; d[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < LINES; n++) begin
      for (int i = 0; i < 4; i++) begin
        eb[i] = rnd_s(W); b[i] = W'(eb[i]);
        ed[i] = rnd_s(W); d[i] = W'(ed[i]);
      end
      ey[0] = eb[0] + eb[1];
      ey[7] = (ed[3] >>> 2) - ed[0];
      ey[1] = ed[3] - (ey[7] >>> 2);
      ey[6] = (eb[3] >>> 1) - eb[2];
      ey[2] = (ey[6] >>> 1) - eb[3];
      ey[5] = ed[2] + ed[1];
      ey[3] = ed[2] - (ey[5] >>> 1);
      ey[4] = (ey[0] >>> 1) - eb[1];
      for (int k = 1; k <= 8; k++) begin
        cnt = cnt8_t'(k);
        @(negedge clk);
        unique case (k)
          4: begin chk($sformatf("line %0d Y0", n), int'(y[0]), ey[0]);
                   chk($sformatf("line %0d Y7", n), int'(y[7]), ey[7]); end
          5: begin chk($sformatf("line %0d Y1", n), int'(y[1]), ey[1]);
                   chk($sformatf("line %0d Y6", n), int'(y[6]), ey[6]); end
          6: begin chk($sformatf("line %0d Y2", n), int'(y[2]), ey[2]);
                   chk($sformatf("line %0d Y5", n), int'(y[5]), ey[5]); end
          7: begin chk($sformatf("line %0d Y3", n), int'(y[3]), ey[3]);
                   chk($sformatf("line %0d Y4", n), int'(y[4]), ey[4]); end
          3: if (n > 0) for (int i = 0; i < 8; i++) chk("previous Y held", int'(y[i]), py[i]);
          default: ;
        endcase
      end
      py = ey;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
