// flywheel: frame synchronisation strategy (search, verify, lock, check).
//
// The flywheel watches the correlator's raw_detect and decides which detects
// are frame syncs.  Its frame bit counter keeps running whether or not syncs
// are found, so frame boundaries go on being marked through noise bursts or
// dropouts, and every frame is passed on to the recorder whatever the state.
//
//   SEARCH  every raw detect is accepted; the counter is aligned to it and
//           the state moves to VERIFY.
//   VERIFY  a detect inside the 3-bit window counts a hit; VERIFY_HITS
//           consecutive hits move to LOCK.  A window without a detect
//           returns to SEARCH.
//   LOCK    detects are accepted only inside the window.  A window without
//           a detect moves to CHECK.
//   CHECK   a detect inside the window returns to LOCK; CHECK_MISSES further
//           windows without a detect return to SEARCH (so two consecutive
//           losses in all, counting the one that left LOCK).
//
// A detect one bit early or late inside the window is accepted and the
// counter realigned to it (bit-slip correction).  Outputs, registered, one
// clock after the deciding raw_detect or window end:
//   frame_sync  a sync was accepted; slip says where it was found
//   loss_pulse  a window closed without a sync (in any state)
//   frame_mark  one per frame: at every accepted sync or window loss
// bit_count is the frame bit counter, state the current state.
//
// The four states, the window and its 19198 start, and the counts on the
// transitions follow the original strategy; how the counts are read, loss
// pulses in SEARCH and the encodings are this design's choices.
module flywheel
  import fs_pkg::*;
#(
  parameter int unsigned FRAME_BITS   = FRAME_BITS_DEFAULT,
  parameter int unsigned WIN_START    = WIN_START_DEFAULT,
  parameter int unsigned VERIFY_HITS  = 2,
  parameter int unsigned CHECK_MISSES = 1,
  localparam int unsigned CW          = $clog2(FRAME_BITS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          raw_detect,
  output fw_state_e     state,
  output logic          frame_sync,
  output logic          loss_pulse,
  output logic          frame_mark,
  output slip_e         slip,
  output logic          in_window,
  output logic [CW-1:0] bit_count
);

  logic       accept, miss, win_last;
  logic [1:0] win_pos;
  logic [3:0] run;   // consecutive hits (VERIFY) or misses (CHECK)

  frame_window #(
    .FRAME_BITS(FRAME_BITS), .WIN_START(WIN_START), .WIN_BITS(3)
  ) u_window (
    .clk, .rst_n, .realign(accept), .count(bit_count), .fw(),
    .in_window(in_window), .win_pos(win_pos), .win_last(win_last)
  );

  assign accept = raw_detect && (state == ST_SEARCH || in_window);
  assign miss   = win_last && !raw_detect;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= ST_SEARCH;
      run        <= '0;
      frame_sync <= 1'b0;
      loss_pulse <= 1'b0;
      frame_mark <= 1'b0;
      slip       <= SLIP_NONE;
    end else begin
      frame_sync <= accept;
      loss_pulse <= miss;
      frame_mark <= accept || miss;
      if (accept)
        slip <= !in_window ? SLIP_NONE : slip_e'(win_pos + 2'd1);

      unique case (state)
        ST_SEARCH: if (accept) begin
          state <= ST_VERIFY;
          run   <= '0;
        end
        ST_VERIFY: begin
          if (accept) begin
            if (run + 1'b1 >= 4'(VERIFY_HITS)) begin
              state <= ST_LOCK;
              run   <= '0;
            end else begin
              run <= run + 1'b1;
            end
          end else if (miss) begin
            state <= ST_SEARCH;
            run   <= '0;
          end
        end
        ST_LOCK: if (miss) begin
          state <= ST_CHECK;
          run   <= '0;
        end
        ST_CHECK: begin
          if (accept) begin
            state <= ST_LOCK;
            run   <= '0;
          end else if (miss) begin
            if (run + 1'b1 >= 4'(CHECK_MISSES)) begin
              state <= ST_SEARCH;
              run   <= '0;
            end else begin
              run <= run + 1'b1;
            end
          end
        end
        default: state <= ST_SEARCH;
      endcase
    end
  end

  // The frame bit counter never leaves its range.
  a_count_range: assert property (@(posedge clk) disable iff (!rst_n)
    bit_count < CW'(FRAME_BITS));

endmodule
