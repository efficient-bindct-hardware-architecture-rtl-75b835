// tb_bindct_serializer: loads eight distinct random values into y and
// walks the count through 1..8. The output must be Y4, Y5, Y6, Y7 on
// counts 1..4 and Y0, Y1, Y2, Y3 on counts 5..8, so that following the
// stage-4 write times the stream reads Y0..Y7 in ascending order.
module tb_bindct_serializer;
  import bindct_pkg::*;
  import bindct_ref_pkg::*;

  localparam int W = 12;

  cnt8_t               cnt = '0;
  logic signed [W-1:0] y [N];
  logic signed [W-1:0] yout;
  int                  checks = 0, failures = 0;

  bindct_serializer #(.W(W)) dut (.cnt, .y, .yout);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v [8];
    for (int rep = 0; rep < 20; rep++) begin
      for (int i = 0; i < 8; i++) begin
        v[i] = rnd_s(W);
        y[i] = W'(v[i]);
      end
      // the stream order: counts 5,6,7,8,1,2,3,4 give Y0..Y7
      for (int s = 0; s < 8; s++) begin
        cnt = cnt8_t'(((s + 4) % 8) + 1);
        #1;
        checks++;
        if (int'(yout) != v[s]) begin
          failures++;
          $display("count %0d: got %0d expected Y%0d = %0d", cnt, yout, s, v[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
