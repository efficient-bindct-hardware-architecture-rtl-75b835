// bindct_transpose_ram: 8x8 transpose memory between the two 1D passes.
//
// A 64-word single-clock memory with one write and one read port. The
// first pass writes its results row by row: write number w goes to
// address w (row w/8, column w%8). The second pass needs them column by
// column, so read number r fetches address (r%8)*8 + r/8, i.e. row r%8 of
// column r/8. Both pointers are 6-bit counters that advance on each
// access and wrap after a block, so the memory needs no other control
// than the two enables from the cycle controller. The document gives the
// block's role; the pointer scheme is this design's choice.
//
// Timing: synchronous write; synchronous read with one cycle latency
// (`rdata` shows the word the cycle after `re`).
module bindct_transpose_ram
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

  logic signed [W-1:0] mem [NN];
  logic [ADDR_W-1:0]   wptr, rptr;
  logic [ADDR_W-1:0]   raddr;

  // Transposed read address: swap the row and column halves of the index.
  assign raddr = {rptr[2:0], rptr[5:3]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (we) wptr <= wptr + 1'b1;
      if (re) rptr <= rptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (we) mem[wptr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
