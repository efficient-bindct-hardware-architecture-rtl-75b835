// bindct_stage1: BinDCT stage 1 (input butterfly).
//
//   a0 = x0 + x7   a1 = x1 + x6   a2 = x2 + x5   a3 = x3 + x4
//   a4 = x3 - x4   a5 = x2 - x5   a6 = x1 - x6   a7 = x0 - x7
//
// The three implementations the document compares are available through
// SOL; all controls are decoded from the cntr8 count.
//   SOL = 3 (default): one add/sub operator, one result per count. Two
//     4-to-1 multiplexers pick the operand pair (x_i, x_7-i), `alu` picks
//     add or subtract and a one-hot enable loads one of the eight output
//     registers. Order a6 a5 a0 a3 a1 a2 a7 a4 on counts T0..T0+7 (the
//     document's: a6 and a5 first because stage 2 waits on them).
//   SOL = 2: one adder and one subtractor share the multiplexers and
//     compute a pair per count: a1/a6, a2/a5, a0/a7, a3/a4 on counts
//     T0..T0+3 (the document's example order).
//   SOL = 1: four adders and four subtractors, all results on count T0.
//
// Timing: `x` must be stable during the counts in use; a_i is registered
// at the end of its count and holds until the same count of the next line.
// Width: W-bit inputs, W+1-bit outputs.
module bindct_stage1
  import bindct_pkg::*;
#(
  parameter int unsigned W   = IN_W,
  parameter int unsigned SOL = 3,       // 1 parallel, 2 adder+subtractor, 3 one add/sub
  parameter cnt8_t       T0  = 4'd1     // count of the first operation
)(
  input  logic                clk,
  input  logic                rst_n,
  input  cnt8_t               cnt,
  input  logic signed [W-1:0] x [N],
  output logic signed [W:0]   a [N]
);

  localparam int S3_DST [N] = '{6, 5, 0, 3, 1, 2, 7, 4};  // SOL 3 order
  localparam int S2_LO  [4] = '{1, 2, 0, 3};              // SOL 2 order (pair i, 7-i)

  logic signed [W:0] xs [N];   // sign-extended inputs

  always_comb begin
    for (int i = 0; i < N; i++) xs[i] = (W+1)'(x[i]);
  end

  if (SOL == 1) begin : g_par

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < N; i++) a[i] <= '0;
      end else if (cnt == T0) begin
        for (int i = 0; i < N / 2; i++) begin
          a[i]         <= xs[i] + xs[N - 1 - i];
          a[N - 1 - i] <= xs[i] - xs[N - 1 - i];
        end
      end
    end

  end else if (SOL == 2) begin : g_pair

    logic              act;
    logic [2:0]        lo, hi;     // a_lo = sum, a_hi = difference
    logic signed [W:0] m1, m2;

    always_comb begin
      act = 1'b0;
      lo  = '0;
      for (int k = 0; k < 4; k++) begin
        if (cnt == cnt_add(T0, k)) begin
          act = 1'b1;
          lo  = 3'(S2_LO[k]);
        end
      end
      hi = 3'd7 - lo;
      m1 = xs[lo];
      m2 = xs[hi];
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < N; i++) a[i] <= '0;
      end else if (act) begin
        a[lo] <= m1 + m2;
        a[hi] <= m1 - m2;
      end
    end

  end else begin : g_shared

    logic              act, alu;   // alu: 0 add, 1 subtract
    logic [2:0]        dst, lo;
    logic signed [W:0] m1, m2, r;

    always_comb begin
      act = 1'b0;
      dst = '0;
      for (int k = 0; k < N; k++) begin
        if (cnt == cnt_add(T0, k)) begin
          act = 1'b1;
          dst = 3'(S3_DST[k]);
        end
      end
      alu = dst[2];                    // a4..a7 are differences
      lo  = alu ? 3'd7 - dst : dst;    // operand pair (x_lo, x_7-lo)
      m1  = xs[lo];
      m2  = xs[3'd7 - lo];
      r   = alu ? (m1 - m2) : (m1 + m2);
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < N; i++) a[i] <= '0;
      end else if (act) begin
        a[dst] <= r;
      end
    end

  end

endmodule
