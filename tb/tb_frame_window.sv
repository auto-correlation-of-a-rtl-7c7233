// tb_frame_window: self-checking test of frame_window (40-bit frames).
// A model counter and a model "clocks since window start" counter are run
// next to the block; realign pulses are applied at random times, inside and
// outside the window.  Checks count, fw, in_window, win_pos and win_last on
// every clock, and that the window covers exactly 3 clocks.
module tb_frame_window;
  localparam int FB = 40, WS = 38, WB = 3;
  logic clk = 1'b0, rst_n = 1'b0, realign = 1'b0;
  logic [5:0] count;
  logic fw, in_window, win_last;
  logic [1:0] win_pos;
  int checks = 0, failures = 0, windows = 0, realigns = 0;
  int mcount, since;   // model counter; clocks since the window opened (-1: closed)

  frame_window #(.FRAME_BITS(FB), .WIN_START(WS), .WIN_BITS(WB)) dut (
    .clk, .rst_n, .realign, .count, .fw, .in_window, .win_pos, .win_last
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%0t: %s (count=%0d model=%0d since=%0d)", $time, what, count, mcount, since);
    end
  endtask

  initial begin
    mcount = 0;
    since  = -1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      // model view of the window before the edge
      if (mcount == WS) since = 0;
      check(int'(count) == mcount, "count");
      check(fw == (mcount == WS), "fw");
      check(in_window == (since >= 0 && since < WB), "in_window");
      if (since >= 0 && since < WB) begin
        check(int'(win_pos) == since, "win_pos");
        check(win_last == (since == WB - 1), "win_last");
      end else begin
        check(!win_last, "win_last outside");
      end
      if (since == WB - 1) windows++;
      // realign: mostly inside the window, sometimes anywhere
      realign = (since >= 0 && since < WB) ? (($urandom % 3) == 0) : (($urandom % 97) == 0);
      @(negedge clk);
      if (realign) begin
        realigns++;
        mcount = 0;
        since  = -1;
      end else begin
        mcount = (mcount == FB - 1) ? 0 : mcount + 1;
        since  = (since >= 0 && since < WB) ? since + 1 : -1;
        if (since == WB) since = -1;
      end
      realign = 1'b0;
    end
    check(windows > 10 && realigns > 10, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
