// pattern_gen: test frame generator for one channel.
//
// Produces the frame format the synchroniser is built for: FRAME_WORDS
// eight-bit words per frame, the first PAT_WORDS of them a fixed pattern (the
// 64-bit frame sync code followed by eight more fixed bytes), the rest video
// bytes taken from video_i.  Words are sent MSB first on sout, one bit per
// clock with en high.  lc is the word counter within the frame (12 bits,
// modulo 2400) and fc counts frames (24 bits), as the original counters do.
//
// Interface and timing: word_out is the word being sent and changes on the
// enabled clock that ends its last bit.  video_rd is high on the enabled
// clock that takes video_i into the next word, so a video source must hold
// the byte valid while video_rd is high.  word_start is high while the first
// bit of a word is on sout, frame_start while the first bit of a frame is.
// After reset the first bit of word 0 of frame 0 is on sout.  The video input
// handshake and reset values are this design's choices.
module pattern_gen #(
  parameter int unsigned  FRAME_WORDS = fs_pkg::FRAME_WORDS_DEFAULT,
  parameter int unsigned  PAT_WORDS   = 16,
  parameter logic [127:0] PATTERN     = fs_pkg::PATTERN_DEFAULT
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic [7:0]  video_i,
  output logic        video_rd,
  output logic        sout,
  output logic [7:0]  word_out,
  output logic [11:0] lc,
  output logic [23:0] fc,
  output logic        word_start,
  output logic        frame_start
);

  // Fixed pattern as a 16-word table, word 0 in the top byte.
  logic [7:0] pat_mem [PAT_WORDS];
  always_comb
    for (int i = 0; i < int'(PAT_WORDS); i++) pat_mem[i] = PATTERN[127 - 8*i -: 8];

  logic [2:0]  bitcnt;
  logic [7:0]  shreg;
  logic [11:0] lc_next;
  logic [7:0]  byte_next;
  logic        word_end;

  assign word_end  = en && bitcnt == 3'd7;
  assign lc_next   = (lc == 12'(FRAME_WORDS - 1)) ? '0 : lc + 1'b1;
  assign byte_next = (lc_next < 12'(PAT_WORDS)) ? pat_mem[lc_next[3:0]] : video_i;
  assign video_rd  = word_end && lc_next >= 12'(PAT_WORDS);

  assign sout        = shreg[7];
  assign word_start  = bitcnt == 3'd0;
  assign frame_start = word_start && lc == '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bitcnt   <= '0;
      lc       <= '0;
      fc       <= '0;
      shreg    <= PATTERN[127 -: 8];
      word_out <= PATTERN[127 -: 8];
    end else if (en) begin
      bitcnt <= bitcnt + 1'b1;
      if (word_end) begin
        shreg    <= byte_next;
        word_out <= byte_next;
        lc       <= lc_next;
        if (lc_next == '0) fc <= fc + 1'b1;
      end else begin
        shreg <= {shreg[6:0], 1'b0};
      end
    end
  end

  initial assert (PAT_WORDS <= 16 && PAT_WORDS < FRAME_WORDS && FRAME_WORDS <= 4096)
    else $error("pattern_gen: bad frame parameters");

endmodule
