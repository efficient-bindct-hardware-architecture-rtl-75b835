// tb_bindct_stage1: random lines (with extreme values) are held on x for
// a period of counts 1..8. After each count the testbench checks that the
// coefficient the schedule assigns to that count (a6 a5 a0 a3 a1 a2 a7 a4)
// has just been written with the reference butterfly value, and at the end
// of the period that all eight are right (8 cycles for the stage).
// Two more instances on the same x check the other implementations:
// SOL 2 (adder + subtractor) must write a1/a6, a2/a5, a0/a7, a3/a4 on
// counts 1..4, and SOL 1 (fully parallel) all eight on count 1.
module tb_bindct_stage1;
  import bindct_pkg::*;
  import bindct_ref_pkg::*;

  localparam int W = 8;
  localparam int LINES = 40;
  localparam int ORDER [8] = '{6, 5, 0, 3, 1, 2, 7, 4};

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  cnt8_t               cnt = '0;
  logic signed [W-1:0] x [N];
  logic signed [W:0]   a [N];
  int                  checks = 0, failures = 0;

  bindct_stage1 #(.W(W)) dut (.clk, .rst_n, .cnt, .x, .a);

  localparam int PAIR_LO [4] = '{1, 2, 0, 3};
  logic signed [W:0]   a2 [N];
  logic signed [W:0]   a1 [N];

  bindct_stage1 #(.W(W), .SOL(2), .T0(4'd1)) dut_pair (.clk, .rst_n, .cnt, .x, .a(a2));
  bindct_stage1 #(.W(W), .SOL(1), .T0(4'd1)) dut_par  (.clk, .rst_n, .cnt, .x, .a(a1));

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

  initial begin
    vec8_t  v;
    ref1d_t r;
    for (int i = 0; i < N; i++) x[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < LINES; n++) begin
      for (int i = 0; i < 8; i++) begin
        v[i] = rnd_s(W);
        x[i] = W'(v[i]);
      end
      r = ref_1d(v);
      for (int k = 1; k <= 8; k++) begin
        cnt = cnt8_t'(k);
        @(negedge clk);
        chk($sformatf("line %0d count %0d a%0d", n, k, ORDER[k-1]), int'(a[ORDER[k-1]]), r.a[ORDER[k-1]]);
        if (k <= 4) begin
          chk($sformatf("SOL 2 line %0d count %0d a%0d", n, k, PAIR_LO[k-1]),
              int'(a2[PAIR_LO[k-1]]), r.a[PAIR_LO[k-1]]);
          chk($sformatf("SOL 2 line %0d count %0d a%0d", n, k, 7 - PAIR_LO[k-1]),
              int'(a2[7 - PAIR_LO[k-1]]), r.a[7 - PAIR_LO[k-1]]);
        end
        if (k == 1)
          for (int i = 0; i < 8; i++) chk($sformatf("SOL 1 line %0d a%0d", n, i), int'(a1[i]), r.a[i]);
      end
      for (int i = 0; i < 8; i++) begin
        chk($sformatf("line %0d a%0d", n, i), int'(a[i]), r.a[i]);
        chk($sformatf("SOL 2 line %0d a%0d", n, i), int'(a2[i]), r.a[i]);
      end
    end
    // count 0 must leave the registers alone
    cnt = '0;
    for (int i = 0; i < N; i++) x[i] = '0;
    @(negedge clk);
    for (int i = 0; i < 8; i++) chk("count 0 hold", int'(a[i]), r.a[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
