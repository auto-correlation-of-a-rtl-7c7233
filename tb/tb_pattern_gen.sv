// tb_pattern_gen: self-checking test of pattern_gen (40-word frames).
// Runs with a random bit enable, collects the serial output into words and
// checks every word (fixed pattern in words 0..15, then video bytes in the
// order the video source handed them out), the word and frame counters, the
// frame_start marker and word_out.
module tb_pattern_gen;
  localparam int FW = 40;
  localparam logic [127:0] PAT = 128'h0C28_F22C_EA7D_0E24_DADE_C697_732A_FE04;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [7:0] video_i = 8'h00, word_out;
  logic video_rd, sout, word_start, frame_start;
  logic [11:0] lc;
  logic [23:0] fc;
  int checks = 0, failures = 0;

  pattern_gen #(.FRAME_WORDS(FW), .PAT_WORDS(16), .PATTERN(PAT)) dut (
    .clk, .rst_n, .en, .video_i, .video_rd, .sout, .word_out, .lc, .fc,
    .word_start, .frame_start
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%0t: %s", $time, what);
    end
  endtask

  initial begin
    logic [7:0] vid_next, exp_word;
    logic [7:0] vq[$];
    logic [7:0] acc;
    int nb, word, frame;
    vid_next = 8'h00;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    nb = 0; word = 0; frame = 0; acc = '0;
    video_i = 8'h37;
    while (frame < 4) begin
      en = ($urandom % 4) != 0;
      #1;
      check(int'(lc) == word && int'(fc) == frame, "counters");
      check(word_start == (nb == 0), "word_start");
      check(frame_start == (nb == 0 && word == 0), "frame_start");
      if (en && video_rd) vq.push_back(video_i);
      if (en) begin
        acc = {acc[6:0], sout};
        nb++;
      end
      @(negedge clk);
      if (en && nb == 8) begin
        exp_word = (word < 16) ? PAT[127 - 8*word -: 8] : vq.pop_front();
        check(acc == exp_word, $sformatf("frame %0d word %0d: %h expected %h", frame, word, acc, exp_word));
        nb = 0;
        word++;
        if (word == FW) begin
          word = 0;
          frame++;
        end
        check(int'(lc) == word, "lc after word");
        if (word >= 16) check(word_out == vq[0], "word_out");
        else            check(word_out == PAT[127 - 8*word -: 8], "word_out pattern");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The video source hands out a new byte after each read.
  always @(posedge clk) if (en && video_rd) video_i <= video_i + 8'd29;
endmodule
