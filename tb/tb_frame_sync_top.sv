// tb_frame_sync_top: end-to-end test of the two-channel synchroniser at its
// full size (2400-byte frames, 64-bit sync code, 3-bit window).
// Each channel's pattern generator feeds its own receiver through a model of
// the link: a short delay line whose length can change by one bit (to make
// the received frame one bit short or long) and an error injector that flips
// chosen bits of the sync code.  The channels run on different clocks.
// A per-frame plan sets the code errors, the slips, the threshold and a
// reference reload, and gives the flywheel state expected once the frame's
// code has passed.  The testbench also checks on every clock that the
// recorder stream (data_out) is the received stream delayed by 73 clocks,
// that the generator sends the fixed pattern at the start of every frame
// and that the video source is read.  It counts each mechanism (sync
// accepted, verify, lock, loss, check, check->lock, check->search, early and
// late slip, rejection by threshold, reference reload, video read) and
// counts a failure for any that never happened.
module tb_frame_sync_top;
  import fs_pkg::*;

  localparam int FBITS = 19200;
  localparam int NFR   = 13;
  localparam logic [127:0] PAT = 128'h0C28_F22C_EA7D_0E24_DADE_C697_732A_FE04;

  typedef struct {
    int errs;       // bit errors in the code
    int slip;       // -1: frame one bit short before this code, +1: long
    int thresh;     // threshold for this frame's code
    bit reload;     // reload the reference before this code
    fw_state_e exp;
  } plan_t;

  localparam int M_SYNC = 0, M_VERIFY = 1, M_LOCK = 2, M_LOSS = 3, M_CHECK = 4,
                 M_RELOCK = 5, M_RESEARCH = 6, M_EARLY = 7, M_LATE = 8,
                 M_REJECT = 9, M_RELOAD = 10, M_VIDEO = 11, NM = 12;
  string mname[NM] = '{"sync", "verify", "lock", "loss", "check", "check->lock",
                       "check->search", "early slip", "late slip",
                       "threshold reject", "reload", "video read"};

  logic clk_a = 1'b0, clk_b = 1'b0;
  logic [1:0] rst_n = '0, gen_en = '0, video_rd, gen_sout, gen_frame_start;
  logic [1:0][7:0] video_i = '0, gen_word;
  logic [1:0][11:0] gen_lc;
  logic [1:0][23:0] gen_fc;
  logic [1:0] rx_din = '0, reload = '0;
  logic [1:0][1:0] thresh = '0;
  chan_status_t [1:0] status;

  int checks = 0, failures = 0;
  int mcount[2][NM];
  bit done[2] = '{0, 0};
  plan_t plan[NFR];

  frame_sync_top dut (
    .clk_a, .clk_b, .rst_n, .gen_en, .video_i, .video_rd, .gen_sout,
    .gen_word, .gen_lc, .gen_fc, .gen_frame_start, .rx_din, .thresh, .reload,
    .status
  );

  always #5 clk_a = ~clk_a;
  always #7 clk_b = ~clk_b;

  initial begin : watchdog
    #(20 * 14 * FBITS);
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
    plan[0]  = '{0,  0, 2, 0, ST_VERIFY};
    plan[1]  = '{2,  0, 2, 0, ST_VERIFY};
    plan[2]  = '{1,  0, 2, 0, ST_LOCK};
    plan[3]  = '{3,  0, 2, 0, ST_CHECK};     // 3 errors > threshold 2
    plan[4]  = '{0,  0, 2, 0, ST_LOCK};
    plan[5]  = '{0, -1, 2, 0, ST_LOCK};      // one bit early
    plan[6]  = '{0,  1, 2, 0, ST_LOCK};      // one bit late
    plan[7]  = '{0,  0, 0, 1, ST_LOCK};      // reference reloaded
    plan[8]  = '{1,  0, 0, 0, ST_CHECK};
    plan[9]  = '{2,  0, 0, 0, ST_SEARCH};
    plan[10] = '{3,  0, 3, 0, ST_VERIFY};
    plan[11] = '{0,  0, 3, 0, ST_VERIFY};
    plan[12] = '{0,  0, 3, 0, ST_LOCK};
  end

  // Video sources: a new byte after every read.
  always @(posedge clk_a) if (video_rd[0]) video_i[0] <= video_i[0] + 8'd7;
  always @(posedge clk_b) if (video_rd[1]) video_i[1] <= video_i[1] + 8'd11;

  for (genvar c = 0; c < 2; c++) begin : g_ch
    logic clk;
    assign clk = (c == 0) ? clk_a : clk_b;

    initial begin
      logic [7:0] line;         // link delay line, line[0] newest
      logic hist[$];            // received bits, one per clock
      int d, pos, fr, cyc;
      fw_state_e prev;
      line = '0;
      d = 4;
      pos = -1;
      fr = -1;
      cyc = 0;
      for (int m = 0; m < NM; m++) mcount[c][m] = 0;
      thresh[c] = 2'(plan[0].thresh);
      repeat (3) @(negedge clk);
      rst_n[c] = 1'b1;
      repeat (200) @(negedge clk);      // reference loads after reset
      check(status[c].ref_ready, "reference loaded");
      prev = status[c].state;
      gen_en[c] = 1'b1;
      while (fr < NFR) begin
        // generator bit now on gen_sout
        if (gen_frame_start[c]) begin
          pos = 0;
          fr++;
          check(int'(gen_fc[c]) == fr, "frame counter");
        end else begin
          pos++;
        end
        if (pos % 8 == 0 && pos / 8 < 16)
          check(gen_word[c] == PAT[127 - 8 * (pos / 8) -: 8], "pattern word");
        // link: errors in the code, then the delay line
        begin
          automatic logic b = gen_sout[c];
          if (fr < NFR && pos < 64 && pos % 16 == 5 && pos / 16 < plan[fr].errs) b = !b;
          line = {line[6:0], b};
        end
        // changes for the next frame, made in this frame's video
        if (pos == 10000 && fr + 1 < NFR) begin
          d = d + plan[fr + 1].slip;
          thresh[c] = 2'(plan[fr + 1].thresh);
          if (plan[fr + 1].reload) begin
            reload[c] = 1'b1;
            mcount[c][M_RELOAD]++;
          end
          if (plan[fr + 1].errs > plan[fr + 1].thresh) mcount[c][M_REJECT]++;
        end
        rx_din[c] = line[d];
        hist.push_back(line[d]);
        @(negedge clk);
        reload[c] = 1'b0;
        cyc++;
        // recorder stream
        if (hist.size() > 73) begin
          checks++;
          if (status[c].data_out !== hist[hist.size() - 1 - 73]) failures++;
        end
        // mechanisms
        if (video_rd[c]) mcount[c][M_VIDEO]++;
        if (status[c].frame_sync) mcount[c][M_SYNC]++;
        if (status[c].loss_pulse) mcount[c][M_LOSS]++;
        if (status[c].frame_sync && status[c].slip == SLIP_EARLY) mcount[c][M_EARLY]++;
        if (status[c].frame_sync && status[c].slip == SLIP_LATE)  mcount[c][M_LATE]++;
        if (status[c].state != prev) begin
          if (status[c].state == ST_VERIFY) mcount[c][M_VERIFY]++;
          if (status[c].state == ST_LOCK && prev == ST_VERIFY) mcount[c][M_LOCK]++;
          if (status[c].state == ST_CHECK) mcount[c][M_CHECK]++;
          if (status[c].state == ST_LOCK && prev == ST_CHECK) mcount[c][M_RELOCK]++;
          if (status[c].state == ST_SEARCH && prev == ST_CHECK) mcount[c][M_RESEARCH]++;
          prev = status[c].state;
        end
        // the frame's code has been judged by now
        if (pos == 5000 && fr >= 0 && fr < NFR) begin
          check(status[c].state == plan[fr].exp,
                $sformatf("ch %0d frame %0d: state %s expected %s", c, fr,
                          status[c].state.name(), plan[fr].exp.name()));
          if (plan[fr].slip < 0) check(status[c].slip == SLIP_EARLY, "early slip seen");
          if (plan[fr].slip > 0) check(status[c].slip == SLIP_LATE, "late slip seen");
          if (plan[fr].slip == 0 && plan[fr].errs <= plan[fr].thresh && fr > 0)
            check(status[c].slip == SLIP_ZERO, "on-time sync");
        end
      end
      done[c] = 1'b1;
    end
  end

  initial begin
    wait (done[0] && done[1]);
    for (int c = 0; c < 2; c++)
      for (int m = 0; m < NM; m++) begin
        $display("channel %0d %-16s %0d", c, mname[m], mcount[c][m]);
        check(mcount[c][m] > 0, $sformatf("channel %0d: %s never happened", c, mname[m]));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
