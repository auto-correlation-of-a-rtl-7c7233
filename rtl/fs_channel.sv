// fs_channel: frame synchroniser for one received channel.
//
// Joins the three parts of a channel: fsc_loader puts the channel's frame
// sync code into the correlator reference (after reset and on every reload
// pulse), the correlator compares the last 64 received bits with it on every
// clock, and the flywheel turns the correlator's raw detects into frame syncs,
// loss pulses and frame marks while keeping the frame count through missing
// syncs.  The received stream is passed on, delayed, on status.data_out, so
// that every frame reaches the recorder whatever the synchroniser state.
//
// Interface: din is one received bit per clock, MSB first.  thresh (0..3) is
// the number of bit errors tolerated in the sync code.  All status fields are
// registered outputs; their timing is that of the correlator (raw_detect 5
// clocks after the last sync bit) and of the flywheel (frame_sync, loss_pulse
// one clock after that).
module fs_channel
  import fs_pkg::*;
#(
  parameter logic [63:0]  FSC          = FSC_DEFAULT,
  parameter int unsigned  FRAME_BITS   = FRAME_BITS_DEFAULT,
  parameter int unsigned  WIN_START    = WIN_START_DEFAULT,
  parameter int unsigned  VERIFY_HITS  = 2,
  parameter int unsigned  CHECK_MISSES = 1,
  parameter int unsigned  DELAY        = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         din,
  input  logic [1:0]   thresh,
  input  logic         reload,
  output chan_status_t status
);

  localparam int unsigned CW = $clog2(FRAME_BITS);

  logic           ref_shift, ref_din, ref_load, raw;
  logic [CW-1:0]  bit_count;

  fsc_loader #(.FSC(FSC)) u_loader (
    .clk, .rst_n, .start(reload), .ref_shift(ref_shift), .ref_din(ref_din),
    .ref_load(ref_load), .busy()
  );

  correlator #(.N(64), .DELAY(DELAY)) u_corr (
    .clk, .rst_n, .din(din), .ref_shift(ref_shift), .ref_din(ref_din),
    .ref_load(ref_load), .thresh(thresh), .score(status.score),
    .raw_detect(raw), .data_out(status.data_out),
    .ref_valid(status.ref_ready), .ref_q()
  );

  flywheel #(
    .FRAME_BITS(FRAME_BITS), .WIN_START(WIN_START),
    .VERIFY_HITS(VERIFY_HITS), .CHECK_MISSES(CHECK_MISSES)
  ) u_fly (
    .clk, .rst_n, .raw_detect(raw), .state(status.state),
    .frame_sync(status.frame_sync), .loss_pulse(status.loss_pulse),
    .frame_mark(status.frame_mark), .slip(status.slip),
    .in_window(status.in_window), .bit_count(bit_count)
  );

  assign status.raw_detect = raw;
  assign status.bit_count  = 15'(bit_count);

endmodule
