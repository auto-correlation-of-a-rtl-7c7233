// tb_flywheel: self-checking test of the flywheel strategy (100-bit frames).
// Raw detects are placed relative to the position where the next sync is
// expected (one clock after count 99): on time, one bit early or late,
// outside the window, or not at all.  After each frame the testbench checks
// the state, the number of frame_sync and loss_pulse pulses, the slip code
// and that the counter was realigned to an accepted sync.  The sequence
// walks every transition: search->verify->lock, lock->check->lock,
// check->search, verify->search, loss pulses while searching, and early and
// late slips.
module tb_flywheel;
  import fs_pkg::*;
  localparam int FB = 100, WS = 98;
  logic clk = 1'b0, rst_n = 1'b0, raw_detect = 1'b0;
  fw_state_e state;
  logic frame_sync, loss_pulse, frame_mark, in_window;
  slip_e slip;
  logic [6:0] bit_count;
  int checks = 0, failures = 0;
  int cyc = 0;            // clock edges taken since reset release
  int nominal;            // edge at which the next on-time sync falls
  int n_sync = 0, n_loss = 0, n_mark = 0;

  flywheel #(.FRAME_BITS(FB), .WIN_START(WS), .VERIFY_HITS(2), .CHECK_MISSES(1)) dut (
    .clk, .rst_n, .raw_detect, .state, .frame_sync, .loss_pulse, .frame_mark,
    .slip, .in_window, .bit_count
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("edge %0d: %s (state=%s slip=%s)", cyc, what, state.name(), slip.name());
    end
  endtask

  task automatic tick(input logic raw);
    raw_detect = raw;
    @(negedge clk);
    cyc++;
    raw_detect = 1'b0;
    n_sync += int'(frame_sync);
    n_loss += int'(loss_pulse);
    n_mark += int'(frame_mark);
  endtask

  // One frame: a detect at nominal+off (none if !present), then run past the
  // window and check the outcome.
  task automatic frame(input logic present, input int off, input fw_state_e exp_state,
                       input int exp_sync, input int exp_loss, input slip_e exp_slip);
    int target = nominal + off;
    int stop   = nominal + 3;
    n_sync = 0; n_loss = 0; n_mark = 0;
    if (present && target + 2 > stop) stop = target + 2;
    while (cyc < stop) tick(present && cyc + 1 == target);
    check(state == exp_state, $sformatf("state, expected %s", exp_state.name()));
    check(n_sync == exp_sync, $sformatf("frame_sync count %0d", n_sync));
    check(n_loss == exp_loss, $sformatf("loss_pulse count %0d", n_loss));
    check(n_mark == exp_sync + exp_loss, "frame_mark count");
    if (exp_sync > 0) begin
      check(slip == exp_slip, $sformatf("slip, expected %s", exp_slip.name()));
      // realigned: the edge after the accepted sync left count 0
      check(int'(bit_count) == cyc - target, $sformatf("bit_count %0d", bit_count));
      nominal = target + FB;
    end else begin
      nominal = nominal + FB;
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // after reset the counter starts at 0: first nominal sync at edge 100
    nominal = FB;
    check(state == ST_SEARCH, "reset state");
    // searching, nothing found: loss pulse at the window
    frame(1'b0, 0, ST_SEARCH, 0, 1, SLIP_NONE);
    // a detect anywhere while searching is taken (here after the window,
    // which still closes with a loss pulse)
    frame(1'b1, 37, ST_VERIFY, 1, 1, SLIP_NONE);
    frame(1'b1, 0, ST_VERIFY, 1, 0, SLIP_ZERO);     // first verify hit
    frame(1'b1, -1, ST_LOCK, 1, 0, SLIP_EARLY);     // second hit: lock
    frame(1'b1, 0, ST_LOCK, 1, 0, SLIP_ZERO);
    frame(1'b0, 0, ST_CHECK, 0, 1, SLIP_ZERO);      // one loss: check
    frame(1'b1, 1, ST_LOCK, 1, 0, SLIP_LATE);       // back to lock
    frame(1'b1, 5, ST_CHECK, 0, 1, SLIP_LATE);      // detect outside window ignored
    frame(1'b0, 0, ST_SEARCH, 0, 1, SLIP_LATE);     // second loss: search
    frame(1'b1, -20, ST_VERIFY, 1, 0, SLIP_NONE);
    frame(1'b0, 0, ST_SEARCH, 0, 1, SLIP_NONE);     // verify fails
    frame(1'b1, 3, ST_VERIFY, 1, 1, SLIP_NONE);
    frame(1'b1, 1, ST_VERIFY, 1, 0, SLIP_LATE);
    frame(1'b1, 0, ST_LOCK, 1, 0, SLIP_ZERO);
    for (int i = 0; i < 5; i++) frame(1'b1, 0, ST_LOCK, 1, 0, SLIP_ZERO);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
