// bindct_stage2: BinDCT stage 2 (odd-part lifting on a5, a6), one add/sub.
//
//   Z0 = a5 - P4*a6          (P4  = 1/2)
//   H  = a6 + U4'*Z0         (U4' = 1/2)
//   Z1 = H  + U4''*Z0        (U4''= 1/4, so Z1 = a6 + (3/4)*Z0)
//   Z2 = P5*Z1 - Z0          (P5  = 1/2)
//
// U4 = 3/4 is split into two shifted terms with the intermediate sum H, as
// in the document, so that one shared add/sub operator does all four steps.
// Two 4-to-1 multiplexers feed the operator; the select, the add/sub mode
// and the register enable come from the cntr8 count: Z0 on count T0, H on
// T0+1, Z1 on T0+2, Z2 on T0+3 (the document's order; T0 = 3 when stage 1
// produces a6 and a5 on counts 1 and 2, T0 = 2 when stage 1 is fully
// parallel). Multiplication by a coefficient is an arithmetic right shift.
//
// Timing: a6 and a5 must be valid from count T0. Z1 is registered at the
// end of count T0+2 and Z2 at the end of count T0+3; both hold for a full
// 8-cycle period.
// Width: W-bit inputs, W+1-bit outputs and internal registers.
module bindct_stage2
  import bindct_pkg::*;
#(
  parameter int unsigned W  = IN_W + 1,
  parameter cnt8_t       T0 = 4'd3      // count of Z0
)(
  input  logic                clk,
  input  logic                rst_n,
  input  cnt8_t               cnt,
  input  logic signed [W-1:0] a5,
  input  logic signed [W-1:0] a6,
  output logic signed [W:0]   z1,
  output logic signed [W:0]   z2
);

  logic signed [W:0] z0, h;     // the other two of the four output registers
  logic signed [W:0] a5x, a6x;  // sign-extended inputs
  logic signed [W:0] m1, m2, r;
  logic              act, alu;
  logic [1:0]        sel;

  assign a5x = (W+1)'(a5);
  assign a6x = (W+1)'(a6);

  // Control decoded from the count: counts T0..T0+3 map to steps 0..3.
  always_comb begin
    act = 1'b0;
    sel = '0;
    for (int k = 0; k < 4; k++) begin
      if (cnt == cnt_add(T0, k)) begin
        act = 1'b1;
        sel = 2'(k);
      end
    end
    alu = (sel == 2'd0) || (sel == 2'd3);   // Z0 and Z2 subtract
  end

  always_comb begin
    unique case (sel)
      2'd0:    begin m1 = a5x;         m2 = a6x >>> SH_P4;  end
      2'd1:    begin m1 = a6x;         m2 = z0  >>> SH_U4A; end
      2'd2:    begin m1 = h;           m2 = z0  >>> SH_U4B; end
      default: begin m1 = z1 >>> SH_P5; m2 = z0;            end
    endcase
    r = alu ? (m1 - m2) : (m1 + m2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      z0 <= '0; h <= '0; z1 <= '0; z2 <= '0;
    end else if (act) begin
      unique case (sel)
        2'd0:    z0 <= r;
        2'd1:    h  <= r;
        2'd2:    z1 <= r;
        default: z2 <= r;
      endcase
    end
  end

endmodule
