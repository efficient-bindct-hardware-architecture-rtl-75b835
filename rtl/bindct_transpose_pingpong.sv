// bindct_transpose_pingpong: double transpose memory for continuous mode.
//
// When 8x8 blocks follow each other without a gap, the second 1D pass
// reads block b column by column while the first pass already writes
// block b+1 row by row; one memory cannot hold both. As the document
// proposes, two transpose memories are used alternately: a demultiplexer
// steers the write enable to the "write bank" and a multiplexer picks the
// read data of the "read bank". Each bank select flips after 64 accesses
// of its kind, so the first pass fills bank 0, 1, 0, 1, ... and the second
// pass drains them in the same order. The bank-select scheme is this
// design's choice.
//
// Interface and timing are those of bindct_transpose_ram: synchronous
// write, one-cycle synchronous read; `rdata` is taken from the bank that
// was selected in the cycle of the read.
module bindct_transpose_pingpong
  import bindct_pkg::*;
#(
  parameter int unsigned W = MID_W
)(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                we,
  input  logic signed [W-1:0] wdata,
  input  logic                re,
  output logic signed [W-1:0] rdata
);

  logic [ADDR_W-1:0]   wcnt, rcnt;   // accesses within the current block
  logic                wbank, rbank, rbank_q;
  logic signed [W-1:0] rd0, rd1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt <= '0; rcnt <= '0;
      wbank <= 1'b0; rbank <= 1'b0; rbank_q <= 1'b0;
    end else begin
      if (we) begin
        wcnt <= wcnt + 1'b1;
        if (wcnt == ADDR_W'(NN - 1)) wbank <= ~wbank;
      end
      if (re) begin
        rcnt <= rcnt + 1'b1;
        if (rcnt == ADDR_W'(NN - 1)) rbank <= ~rbank;
        rbank_q <= rbank;
      end
    end
  end

  bindct_transpose_ram #(.W(W)) u_bank0 (
    .clk, .rst_n, .we(we && !wbank), .wdata, .re(re && !rbank), .rdata(rd0));
  bindct_transpose_ram #(.W(W)) u_bank1 (
    .clk, .rst_n, .we(we &&  wbank), .wdata, .re(re &&  rbank), .rdata(rd1));

  assign rdata = rbank_q ? rd1 : rd0;

endmodule
