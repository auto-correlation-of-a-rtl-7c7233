// tb_fs_channel: self-checking test of one synchroniser channel (400-bit
// frames so that many frames fit in a short run).
// A stream of frames, each starting with the 64-bit sync code, is fed in with
// chosen bit errors in the code, one-bit slips (a data bit dropped or
// repeated before the code) and threshold changes.  At the end of each frame
// the testbench checks the flywheel state, the number of accepted syncs and
// loss pulses in that frame and the slip code, and on every clock that
// data_out is the input delayed by 73 clocks.  A reference reload is made
// while the channel is locked and must not disturb it.
module tb_fs_channel;
  import fs_pkg::*;
  localparam int FB = 400;
  localparam logic [63:0] CODE = 64'h0C28_F22C_EA7D_0E24;
  logic clk = 1'b0, rst_n = 1'b0, din = 1'b0, reload = 1'b0;
  logic [1:0] thresh = 2'd2;
  chan_status_t st;
  int checks = 0, failures = 0;
  logic hist[$];
  int n_sync = 0, n_loss = 0;

  fs_channel #(.FSC(CODE), .FRAME_BITS(FB), .WIN_START(FB - 2)) dut (
    .clk, .rst_n, .din, .thresh, .reload, .status(st)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("bit %0d: %s (state=%s slip=%s)", hist.size(), what, st.state.name(), st.slip.name());
    end
  endtask

  task automatic send(input logic b);
    din = b;
    hist.push_back(b);
    @(negedge clk);
    reload = 1'b0;
    n_sync += int'(st.frame_sync);
    n_loss += int'(st.loss_pulse);
    if (hist.size() > 73) begin
      checks++;
      if (st.data_out !== hist[hist.size() - 1 - 73]) failures++;
    end
  endtask

  // One frame: the code with errs errors, then data.  slip = -1 drops the
  // last data bit (the next code comes one bit early), +1 adds one.
  task automatic frame(input int errs, input int slip, input fw_state_e exp_state,
                       input int exp_sync, input int exp_loss, input slip_e exp_slip);
    logic [63:0] c = CODE;
    n_sync = 0;
    n_loss = 0;
    for (int e = 0; e < errs; e++) c[e * 16 + 5] = !c[e * 16 + 5];
    for (int i = 63; i >= 0; i--) send(c[i]);
    for (int i = 0; i < FB - 64 + slip; i++) send(1'($urandom));
    check(st.state == exp_state, $sformatf("state, expected %s", exp_state.name()));
    check(n_sync == exp_sync, $sformatf("syncs %0d", n_sync));
    check(n_loss == exp_loss, $sformatf("losses %0d", n_loss));
    if (exp_sync > 0) check(st.slip == exp_slip, $sformatf("slip, expected %s", exp_slip.name()));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // all-zero lead-in while the reference is loaded: the cleared holding
    // register must not produce a detect
    for (int i = 0; i < 150; i++) send(1'b0);
    check(st.ref_ready && st.state == ST_SEARCH && n_sync == 0, "reference loaded, searching");
    frame(0, 0, ST_VERIFY, 1, 0, SLIP_NONE);
    frame(2, 0, ST_VERIFY, 1, 0, SLIP_ZERO);
    frame(1, -1, ST_LOCK, 1, 0, SLIP_ZERO);
    frame(3, 0, ST_CHECK, 0, 1, SLIP_ZERO);     // 3 errors > threshold 2
    frame(0, 1, ST_LOCK, 1, 0, SLIP_EARLY);     // previous frame was one bit short
    frame(0, 0, ST_LOCK, 1, 0, SLIP_LATE);      // previous frame was one bit long
    reload = 1'b1;                              // reload the same code while locked
    frame(0, 0, ST_LOCK, 1, 0, SLIP_ZERO);
    frame(4, 0, ST_CHECK, 0, 1, SLIP_ZERO);
    frame(3, 0, ST_SEARCH, 0, 1, SLIP_ZERO);
    // the counter kept running, so the code is found where the window is
    frame(0, 0, ST_VERIFY, 1, 0, SLIP_ZERO);
    thresh = 2'd0;
    frame(1, 0, ST_SEARCH, 0, 1, SLIP_NONE);    // one error, threshold 0
    thresh = 2'd3;
    frame(3, 0, ST_VERIFY, 1, 0, SLIP_ZERO);
    frame(3, 0, ST_VERIFY, 1, 0, SLIP_ZERO);
    frame(2, 0, ST_LOCK, 1, 0, SLIP_ZERO);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
