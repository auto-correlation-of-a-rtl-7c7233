// tb_threshold_sweep: threshold sweep on corrupted sync codes, full size.
// Channel A's generator is looped back to its receiver with every frame's
// sync code carrying exactly 3 bit errors, and the threshold is stepped
// through 0, 2, 3, 1, 3, 0 (three frames each).  With at most 2 errors
// allowed no code may be accepted and every frame must give a loss pulse;
// with 3 allowed every code must be accepted, and the third frame in a row
// must bring the flywheel to lock.  Channel B is held in reset.  Prints the
// detects and losses per threshold step.
module tb_threshold_sweep;
  import fs_pkg::*;

  localparam int NSTEP = 6, PER = 3;
  int steps[NSTEP] = '{0, 2, 3, 1, 3, 0};

  logic clk_a = 1'b0, clk_b = 1'b0;
  logic [1:0] rst_n = '0, gen_en = '0, video_rd, gen_sout, gen_frame_start;
  logic [1:0][7:0] video_i = '0, gen_word;
  logic [1:0][11:0] gen_lc;
  logic [1:0][23:0] gen_fc;
  logic [1:0] rx_din = '0, reload = '0;
  logic [1:0][1:0] thresh = '0;
  chan_status_t [1:0] status;
  int checks = 0, failures = 0;

  frame_sync_top dut (
    .clk_a, .clk_b, .rst_n, .gen_en, .video_i, .video_rd, .gen_sout,
    .gen_word, .gen_lc, .gen_fc, .gen_frame_start, .rx_din, .thresh, .reload,
    .status
  );

  always #5 clk_a = ~clk_a;
  always #7 clk_b = ~clk_b;
  always @(posedge clk_a) if (video_rd[0]) video_i[0] <= video_i[0] + 8'd13;

  initial begin : watchdog
    #(10 * 19200 * (NSTEP * PER + 3));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("%0t: %s", $time, what);
    end
  endtask

  initial begin
    logic [3:0] line = '0;
    int pos = -1, fr = -1, syncs = 0, losses = 0;
    thresh[0] = 2'(steps[0]);
    repeat (3) @(negedge clk_a);
    rst_n[0] = 1'b1;
    repeat (200) @(negedge clk_a);
    gen_en[0] = 1'b1;
    while (fr < NSTEP * PER) begin
      if (gen_frame_start[0]) begin
        pos = 0;
        fr++;
      end else begin
        pos++;
      end
      // three errors in every code
      line = {line[2:0], gen_sout[0] ^ (pos < 60 && pos % 20 == 3)};
      rx_din[0] = line[3];
      if (pos == 10000 && fr + 1 < NSTEP * PER) thresh[0] = 2'(steps[(fr + 1) / PER]);
      @(negedge clk_a);
      syncs  += int'(status[0].frame_sync);
      losses += int'(status[0].loss_pulse);
      if (pos == 19000) begin
        automatic int t = steps[fr / PER];
        check(syncs == (t == 3 ? 1 : 0), $sformatf("frame %0d thresh %0d: %0d syncs", fr, t, syncs));
        check(losses == (t == 3 ? 0 : 1), $sformatf("frame %0d thresh %0d: %0d losses", fr, t, losses));
        if (t == 3 && fr % PER == PER - 1)
          check(status[0].state == ST_LOCK, "locked after three accepted frames");
        if (t != 3 && fr % PER == PER - 1)
          check(status[0].state == ST_SEARCH, "searching after losses");
        $display("frame %2d  thresh %0d  detects %0d  losses %0d  state %s",
                 fr, t, syncs, losses, status[0].state.name());
        syncs = 0;
        losses = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
