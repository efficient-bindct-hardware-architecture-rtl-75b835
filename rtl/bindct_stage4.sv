// bindct_stage4: BinDCT stage 4 (output lifting), two add/sub operators.
//
//   Y0 = b0 + b1            Y7 = P3*d3 - d0     (P3 = 1/4)
//   Y1 = d3 - U3*Y7         Y6 = P1*b3 - b2     (U3 = 1/4, P1 = 1/2)
//   Y2 = U1*Y6 - b3         Y5 = P2*d2 + d1     (U1 = 1/2, P2 = 1)
//   Y3 = d2 - U2*Y5         Y4 = Y0/2 - b1      (U2 = 1/2)
//
// Operators A and B each compute at most one output per cycle. The count
// at which Yk is computed is T[k] and the operator is OPB[k] (0 = A,
// 1 = B); all four architectures the design can be built as use this
// two-operator form and differ only in these tables. The default is the
// document's order for the smallest architecture: Y0 & Y7 on count 4,
// Y1 & Y6 on 5, Y2 & Y5 on 6, Y3 & Y4 on 7, with A on the left column.
// Each output only uses outputs computed earlier (Y1 needs Y7, Y2 needs
// Y6, Y3 needs Y5, Y4 needs Y0), which is what fixes the order. The
// operand multiplexers, add/sub modes and register enables are decoded
// from the cntr8 count; the signs are the document's control table for
// this stage and coefficients are arithmetic right shifts.
//
// Timing: b and d of a line must be stable whenever one of their outputs
// is computed; Yk is registered at the end of count T[k].
// Width: W-bit inputs, W+1-bit outputs.
module bindct_stage4
  import bindct_pkg::*;
#(
  parameter int unsigned     W   = IN_W + 3,
  //                              Y7    Y6    Y5    Y4    Y3    Y2    Y1    Y0
  parameter logic [7:0][3:0] T   = {4'd4, 4'd5, 4'd6, 4'd7, 4'd7, 4'd6, 4'd5, 4'd4},
  parameter logic [7:0]      OPB = 8'b1111_0000
)(
  input  logic                clk,
  input  logic                rst_n,
  input  cnt8_t               cnt,
  input  logic signed [W-1:0] b [4],
  input  logic signed [W-1:0] d [4],
  output logic signed [W:0]   y [N]
);

  logic signed [W:0] bx [4];
  logic signed [W:0] dx [4];
  logic signed [W:0] om1 [N];    // operands of each output
  logic signed [W:0] om2 [N];

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      bx[i] = (W+1)'(b[i]);
      dx[i] = (W+1)'(d[i]);
    end
    om1[0] = bx[0];              om2[0] = bx[1];
    om1[1] = dx[3];              om2[1] = y[7] >>> SH_U3;
    om1[2] = y[6] >>> SH_U1;     om2[2] = bx[3];
    om1[3] = dx[2];              om2[3] = y[5] >>> SH_U2;
    om1[4] = y[0] >>> SH_Y0H;    om2[4] = bx[1];
    om1[5] = dx[2];              om2[5] = dx[1];
    om1[6] = bx[3] >>> SH_P1;    om2[6] = bx[2];
    om1[7] = dx[3] >>> SH_P3;    om2[7] = dx[0];
  end

  logic [1:0]        act;        // operator A (0) / B (1) busy
  logic [1:0][2:0]   k;          // output computed by each operator
  logic signed [W:0] ra, rb;

  for (genvar o = 0; o < 2; o++) begin : g_op
    always_comb begin
      act[o] = 1'b0;
      k[o]   = '0;
      for (int i = 0; i < N; i++) begin
        if (cnt == cnt8_t'(T[i]) && OPB[i] == 1'(o)) begin
          act[o] = 1'b1;
          k[o]   = 3'(i);
        end
      end
    end
  end

  // Only Y0 and Y5 are sums.
  function automatic logic sub_of(input logic [2:0] i);
    return i != 3'd0 && i != 3'd5;
  endfunction

  assign ra = sub_of(k[0]) ? (om1[k[0]] - om2[k[0]]) : (om1[k[0]] + om2[k[0]]);
  assign rb = sub_of(k[1]) ? (om1[k[1]] - om2[k[1]]) : (om1[k[1]] + om2[k[1]]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) y[i] <= '0;
    end else begin
      if (act[0]) y[k[0]] <= ra;
      if (act[1]) y[k[1]] <= rb;
    end
  end

endmodule
