// frame_sync_top: two-channel real-time frame synchroniser with test source.
//
// Each of the two channels (index 0 = A, 1 = B) runs on its own clock and
// reset and holds two independent parts:
//   - pattern_gen, the daily test source: frames of FRAME_WORDS bytes that
//     start with the 16-byte fixed pattern (the channel's sync code and eight
//     more fixed bytes), followed by video bytes from video_i, sent serially;
//   - fs_channel, the receiver: correlator against the channel's sync code,
//     flywheel synchroniser, and the delayed data stream for the recorder.
// The generator output is not wired to the receiver inside; the ground
// station (or a testbench) connects gen_sout to rx_din through the link under
// test.  The bit synchroniser that delivers rx_din and the recorder that
// stores status.data_out are outside this design.
//
// Both channels use the same sync code and pattern by default; each has its
// own parameter so that a second code can be set.
module frame_sync_top
  import fs_pkg::*;
#(
  parameter logic [63:0]  FSC_A       = FSC_DEFAULT,
  parameter logic [63:0]  FSC_B       = FSC_DEFAULT,
  parameter logic [63:0]  TAIL_A      = TAIL_DEFAULT,
  parameter logic [63:0]  TAIL_B      = TAIL_DEFAULT,
  parameter int unsigned  FRAME_WORDS = FRAME_WORDS_DEFAULT,
  parameter int unsigned  WIN_START   = WIN_START_DEFAULT
) (
  input  logic               clk_a,
  input  logic               clk_b,
  input  logic [1:0]         rst_n,
  // test pattern generators
  input  logic [1:0]         gen_en,
  input  logic [1:0][7:0]    video_i,
  output logic [1:0]         video_rd,
  output logic [1:0]         gen_sout,
  output logic [1:0][7:0]    gen_word,
  output logic [1:0][11:0]   gen_lc,
  output logic [1:0][23:0]   gen_fc,
  output logic [1:0]         gen_frame_start,
  // receivers
  input  logic [1:0]         rx_din,
  input  logic [1:0][1:0]    thresh,
  input  logic [1:0]         reload,
  output chan_status_t [1:0] status
);

  logic [1:0] clk;
  assign clk = {clk_b, clk_a};

  for (genvar c = 0; c < 2; c++) begin : g_ch
    localparam logic [63:0] FSC_C  = (c == 0) ? FSC_A  : FSC_B;
    localparam logic [63:0] TAIL_C = (c == 0) ? TAIL_A : TAIL_B;

    pattern_gen #(
      .FRAME_WORDS(FRAME_WORDS), .PAT_WORDS(16), .PATTERN({FSC_C, TAIL_C})
    ) u_gen (
      .clk(clk[c]), .rst_n(rst_n[c]), .en(gen_en[c]), .video_i(video_i[c]),
      .video_rd(video_rd[c]), .sout(gen_sout[c]), .word_out(gen_word[c]),
      .lc(gen_lc[c]), .fc(gen_fc[c]), .word_start(),
      .frame_start(gen_frame_start[c])
    );

    fs_channel #(
      .FSC(FSC_C), .FRAME_BITS(FRAME_WORDS * 8), .WIN_START(WIN_START)
    ) u_rx (
      .clk(clk[c]), .rst_n(rst_n[c]), .din(rx_din[c]), .thresh(thresh[c]),
      .reload(reload[c]), .status(status[c])
    );
  end

endmodule
