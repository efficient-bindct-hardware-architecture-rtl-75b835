// bindct_stage3: BinDCT stage 3 (second butterfly layer).
//
//   b0 = a0 + a3   b3 = a0 - a3   b1 = a1 + a2   b2 = a1 - a2
//   d0 = a4 + Z2   d1 = a4 - Z2   d3 = a7 + Z1   d2 = a7 - Z1
//
// Two 4-to-1 multiplexers pick the operand pair (a0,a3), (a1,a2), (a4,Z2)
// or (a7,Z1). The count at which each result is computed is the table T
// (one 4-bit count per result, index 0..7 = b0 b1 b2 b3 d0 d1 d2 d3), so
// the same hardware serves every architecture's schedule. All controls
// are decoded from the cntr8 count.
//   SOL = 3 (default): one add/sub operator, one result per count. The
//     default table is the document's order for the smallest architecture:
//     b0, b3, b1 on counts 6, 7, 8, then d0, d3, b2, d2, d1 on counts 1..5
//     of the following period, so the operator is busy every cycle.
//   SOL = 2: one adder and one subtractor compute the two results of an
//     operand pair together (b0/b3, b1/b2, d0/d1, d3/d2) on the count
//     given for the sum (b0, b1, d0, d3).
//
// Timing: each input must be read before the stage that writes it
// overwrites it with the next line; the schedule tables in bindct_pkg are
// built so that this holds. Width: W-bit operands (the a_i arrive one bit
// narrower and are sign-extended), W+1-bit outputs.
module bindct_stage3
  import bindct_pkg::*;
#(
  parameter int unsigned     W   = IN_W + 2,
  parameter int unsigned     SOL = 3,    // 2 adder+subtractor, 3 one add/sub
  //                              d3    d2    d1    d0    b3    b2    b1    b0
  parameter logic [7:0][3:0] T   = {4'd2, 4'd4, 4'd5, 4'd1, 4'd7, 4'd3, 4'd8, 4'd6}
)(
  input  logic                clk,
  input  logic                rst_n,
  input  cnt8_t               cnt,
  input  logic signed [W-2:0] a [N],
  input  logic signed [W-1:0] z1,
  input  logic signed [W-1:0] z2,
  output logic signed [W:0]   b [4],
  output logic signed [W:0]   d [4]
);

  // Result k: operand pair and sign. Pairs: 0 (a0,a3) 1 (a1,a2)
  // 2 (a4,Z2) 3 (a7,Z1). Differences: b2, b3, d1, d2.
  function automatic logic [1:0] pair_of(input logic [2:0] k);
    unique case (k)
      3'd0, 3'd3: return 2'd0;
      3'd1, 3'd2: return 2'd1;
      3'd4, 3'd5: return 2'd2;
      default:    return 2'd3;
    endcase
  endfunction

  function automatic logic sub_of(input logic [2:0] k);
    return k == 3'd2 || k == 3'd3 || k == 3'd5 || k == 3'd6;
  endfunction
  //                                 pair 3  pair 2  pair 1  pair 0
  localparam logic [3:0][2:0] SUM  = {3'd7,   3'd4,   3'd1,   3'd0};   // SOL 2
  localparam logic [3:0][2:0] DIF  = {3'd6,   3'd5,   3'd2,   3'd3};   // SOL 2

  logic signed [W:0] m1, m2;
  logic [1:0]        sel;

  always_comb begin
    unique case (sel)
      2'd0:    begin m1 = (W+1)'(a[0]); m2 = (W+1)'(a[3]); end
      2'd1:    begin m1 = (W+1)'(a[1]); m2 = (W+1)'(a[2]); end
      2'd2:    begin m1 = (W+1)'(a[4]); m2 = (W+1)'(z2);  end
      default: begin m1 = (W+1)'(a[7]); m2 = (W+1)'(z1);  end
    endcase
  end

  if (SOL == 2) begin : g_pair

    logic       act;
    logic [2:0] ks, kd;   // result index of the sum and of the difference

    always_comb begin
      act = 1'b0;
      sel = '0;
      ks  = '0;
      kd  = '0;
      for (int p = 0; p < 4; p++) begin
        if (cnt == cnt8_t'(T[SUM[p]])) begin
          act = 1'b1;
          sel = 2'(p);
          ks  = SUM[p];
          kd  = DIF[p];
        end
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < 4; i++) begin b[i] <= '0; d[i] <= '0; end
      end else if (act) begin
        if (ks[2]) d[ks[1:0]] <= m1 + m2;
        else       b[ks[1:0]] <= m1 + m2;
        if (kd[2]) d[kd[1:0]] <= m1 - m2;
        else       b[kd[1:0]] <= m1 - m2;
      end
    end

  end else begin : g_shared

    logic              act, alu;   // alu: 0 add, 1 subtract
    logic [2:0]        k;
    logic signed [W:0] r;

    always_comb begin
      act = 1'b0;
      k   = '0;
      for (int i = 0; i < N; i++) begin
        if (cnt == cnt8_t'(T[i])) begin
          act = 1'b1;
          k   = 3'(i);
        end
      end
      sel = pair_of(k);
      alu = sub_of(k);
    end

    assign r = alu ? (m1 - m2) : (m1 + m2);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < 4; i++) begin b[i] <= '0; d[i] <= '0; end
      end else if (act) begin
        if (k[2]) d[k[1:0]] <= r;
        else      b[k[1:0]] <= r;
      end
    end

  end

endmodule
