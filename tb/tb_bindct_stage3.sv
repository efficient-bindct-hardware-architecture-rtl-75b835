// tb_bindct_stage3: random a_i (9 bit) and Z1/Z2 (10 bit) are held from
// count 6 of one period to count 5 of the next, the window in which the
// stage reads them. After each count the testbench checks the output the
// schedule assigns to it (b0 b3 b1 on 6 7 8, d0 d3 b2 d2 d1 on 1..5)
// against the reference butterflies: eight results in eight cycles.
// A second instance checks SOL 2 (adder + subtractor) with the pair
// schedule b1/b2 on count 3, b0/b3 on 5, d3/d2 on 6, d0/d1 on 7: after
// each of those counts both results of the pair must be right.
module tb_bindct_stage3;
  import bindct_pkg::*;
  import bindct_ref_pkg::*;

  localparam int W = 10;
  localparam int LINES = 50;
  localparam int CNTS [8] = '{6, 7, 8, 1, 2, 3, 4, 5};
  localparam bit ISD  [8] = '{0, 0, 0, 1, 1, 0, 1, 1};
  localparam int IDX  [8] = '{0, 3, 1, 0, 3, 2, 2, 1};

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  cnt8_t               cnt = '0;
  logic signed [W-2:0] a [N];
  logic signed [W-1:0] z1 = '0, z2 = '0;
  logic signed [W:0]   b [4];
  logic signed [W:0]   d [4];
  int                  checks = 0, failures = 0;

  bindct_stage3 #(.W(W)) dut (.clk, .rst_n, .cnt, .a, .z1, .z2, .b, .d);

  logic signed [W:0]   b2 [4];
  logic signed [W:0]   d2 [4];

  //                                       d3    d2    d1    d0    b3    b2    b1    b0
  bindct_stage3 #(.W(W), .SOL(2), .T({4'd6, 4'd6, 4'd7, 4'd7, 4'd5, 4'd3, 4'd3, 4'd5}))
    dut_pair (.clk, .rst_n, .cnt, .a, .z1, .z2, .b(b2), .d(d2));

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
    int ea [8];
    int ez1, ez2;
    int eb [4];
    int ed [4];
    for (int i = 0; i < N; i++) a[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < LINES; n++) begin
      for (int i = 0; i < 8; i++) begin
        ea[i] = rnd_s(W - 1);
        a[i]  = (W-1)'(ea[i]);
      end
      ez1 = rnd_s(W); z1 = W'(ez1);
      ez2 = rnd_s(W); z2 = W'(ez2);
      eb[0] = ea[0] + ea[3]; eb[3] = ea[0] - ea[3];
      eb[1] = ea[1] + ea[2]; eb[2] = ea[1] - ea[2];
      ed[0] = ea[4] + ez2;   ed[1] = ea[4] - ez2;
      ed[3] = ea[7] + ez1;   ed[2] = ea[7] - ez1;
      for (int s = 0; s < 8; s++) begin
        cnt = cnt8_t'(CNTS[s]);
        @(negedge clk);
        if (ISD[s]) chk($sformatf("line %0d count %0d d%0d", n, CNTS[s], IDX[s]), int'(d[IDX[s]]), ed[IDX[s]]);
        else        chk($sformatf("line %0d count %0d b%0d", n, CNTS[s], IDX[s]), int'(b[IDX[s]]), eb[IDX[s]]);
        unique case (CNTS[s])
          3: begin chk("SOL 2 b1", int'(b2[1]), eb[1]); chk("SOL 2 b2", int'(b2[2]), eb[2]); end
          5: begin chk("SOL 2 b0", int'(b2[0]), eb[0]); chk("SOL 2 b3", int'(b2[3]), eb[3]); end
          6: begin chk("SOL 2 d3", int'(d2[3]), ed[3]); chk("SOL 2 d2", int'(d2[2]), ed[2]); end
          7: begin chk("SOL 2 d0", int'(d2[0]), ed[0]); chk("SOL 2 d1", int'(d2[1]), ed[1]); end
          default: ;
        endcase
      end
      for (int i = 0; i < 4; i++) begin
        chk("b end", int'(b[i]), eb[i]);
        chk("d end", int'(d[i]), ed[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
