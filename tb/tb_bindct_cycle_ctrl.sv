// tb_bindct_cycle_ctrl: pulses start (also while busy, which must be
// ignored) and checks every control output cycle by cycle against the
// timetable of one block: en1 on 0..84, we on 21..84, re on 85..148,
// en2 on 86..170, out_rdy on 107..170, busy on 1..170, all low otherwise.
// A second instance in continuous mode gets two starts 64 cycles apart
// and a third one 86 cycles after the second; its windows must be the
// union of the blocks' windows and `ready` must follow the start rules
// (64 cycles exactly, or 86 or more, after the latest start).
module tb_bindct_cycle_ctrl;
  import bindct_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic ready, busy, en1, we, re, en2, out_rdy;
  int   checks = 0, failures = 0;

  bindct_cycle_ctrl dut (.clk, .rst_n, .start, .ready, .busy, .en1, .we, .re, .en2, .out_rdy);

  logic startc = 1'b0;
  logic readyc, busyc, en1c, wec, rec, en2c, out_rdyc;
  bindct_cycle_ctrl #(.CONTINUOUS(1'b1)) dutc (.clk, .rst_n, .start(startc), .ready(readyc), .busy(busyc),
    .en1(en1c), .we(wec), .re(rec), .en2(en2c), .out_rdy(out_rdyc));

  function automatic bit win_any(input int c, input int lo, input int hi);
    // starts at 0, 64 and 150
    return (c >= lo && c <= hi) || (c >= 64 + lo && c <= 64 + hi) || (c >= 150 + lo && c <= 150 + hi);
  endfunction

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic got, input logic exp, input int c);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("cycle %0d %s: got %0b expected %0b", c, what, got, exp);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    for (int blk = 0; blk < 2; blk++) begin
      for (int c = 0; c < 180; c++) begin
        // start in cycle 0, and spurious starts while busy
        start = (c == 0) || (c == 50) || (c == 170);
        #1;
        chk("en1",     en1,     c <= 84, c);
        chk("we",      we,      c >= 21 && c <= 84, c);
        chk("re",      re,      c >= 85 && c <= 148, c);
        chk("en2",     en2,     c >= 86 && c <= 170, c);
        chk("out_rdy", out_rdy, c >= 107 && c <= 170, c);
        chk("busy",    busy,    c >= 1 && c <= 170, c);
        chk("ready",   ready,   c == 0 || c > 170, c);
        @(negedge clk);
      end
      start = 1'b0;
      repeat (3) @(negedge clk);
    end
    // continuous mode
    for (int c = 0; c < 340; c++) begin
      startc = (c == 0) || (c == 64) || (c == 100) || (c == 150);
      #1;
      chk("c en1",     en1c,     win_any(c, 0, 84), c);
      chk("c we",      wec,      win_any(c, 21, 84), c);
      chk("c re",      rec,      win_any(c, 85, 148), c);
      chk("c en2",     en2c,     win_any(c, 86, 170), c);
      chk("c out_rdy", out_rdyc, win_any(c, 107, 170), c);
      if (c == 64 || c == 150 || c == 0) chk("c ready", readyc, 1'b1, c);
      if (c == 63 || c == 65 || c == 100 || c == 149) chk("c not ready", readyc, 1'b0, c);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
