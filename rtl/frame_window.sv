// frame_window: frame bit counter and bit-slip window of the flywheel.
//
// count runs 0 .. FRAME_BITS-1, one step per received bit, and restarts at 0
// after the last bit of a frame.  The sync is expected when count is
// FRAME_BITS-1 (the correlator reports a sync on the clock after its last
// bit).  fw is high when count equals WIN_START (19198, one bit before the
// expected position); fw then runs through a short delay chain (the first
// stage corresponds to the "dg2" flip-flop of the original), and the window
// is open while fw or any chain stage is high: WIN_BITS clocks, i.e. one bit
// early, on time, and one bit late (the late bit falls on count 0 of the next
// frame).  win_pos gives the position inside the window (0 = early) and
// win_last marks its last bit.
//
// realign is driven by the flywheel when it accepts a sync: the counter
// restarts so that the clock after the accepted sync has count 0, and the
// rest of the window is cancelled.  A sync accepted early therefore shortens
// the frame by one bit and a late one lengthens it by one bit.
module frame_window #(
  parameter int unsigned FRAME_BITS = fs_pkg::FRAME_BITS_DEFAULT,
  parameter int unsigned WIN_START  = fs_pkg::WIN_START_DEFAULT,
  parameter int unsigned WIN_BITS   = 3,
  localparam int unsigned CW        = $clog2(FRAME_BITS),
  localparam int unsigned PW        = $clog2(WIN_BITS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          realign,
  output logic [CW-1:0] count,
  output logic          fw,
  output logic          in_window,
  output logic [PW-1:0] win_pos,
  output logic          win_last
);

  logic [WIN_BITS-2:0] chain;

  assign fw        = count == CW'(WIN_START);
  assign in_window = fw | (|chain);
  assign win_last  = chain[WIN_BITS-2];

  always_comb begin
    win_pos = '0;
    for (int i = 0; i < int'(WIN_BITS) - 1; i++)
      if (chain[i]) win_pos = PW'(i + 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      chain <= '0;
    end else begin
      if (realign || count == CW'(FRAME_BITS - 1)) count <= '0;
      else                                         count <= count + 1'b1;
      if (realign) chain <= '0;
      else         chain <= {chain[WIN_BITS-3:0], fw};
    end
  end

  initial assert (WIN_BITS >= 3 && WIN_START < FRAME_BITS)
    else $error("frame_window: bad window parameters");

endmodule
