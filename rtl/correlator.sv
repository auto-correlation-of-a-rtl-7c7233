// correlator: serial frame-sync correlator.
//
// The received bit stream is shifted, one bit per clock, into an N-bit input
// register.  A second N-bit shift register, with its own shift enable, takes
// the reference code serially; a holding register (ref_latch) follows it
// while ref_load is high and holds it otherwise.  Every bit of the input
// register is compared with the matching reference bit (XOR, inverted so that
// a one marks agreement), the N-bit match vector is counted by a four-stage
// pipelined summer, and the threshold detector raises raw_detect when at most
// thresh bits disagree.  The oldest bit of the input register also runs
// through a DELAY-bit delay line to data_out, the stream passed on to the
// recorder.
//
// Timing, counting from the clock edge that shifts in the last bit of a code
// word: score shows its count 4 clocks later, raw_detect is high for one clock
// 5 clocks later.  data_out is din delayed by N + DELAY - 1 clocks, so the first
// code bit leaves data_out DELAY - 5 clocks after raw_detect.  raw_detect
// stays low until the first scores computed against a loaded reference
// (ref_valid) reach the detector output.
//
// The register sizes, the four summer stages, the threshold rule and the
// 10-bit delay line are those of the original design; the single clock with
// enables and the polarity of the match vector are this design's choices.
module correlator #(
  parameter int unsigned N     = 64,
  parameter int unsigned DELAY = 10
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   din,        // received serial data, MSB first
  input  logic                   ref_shift,  // shift ref_din into the reference register
  input  logic                   ref_din,
  input  logic                   ref_load,   // holding register follows the reference register
  input  logic [1:0]             thresh,     // allowed bit errors, 0..3
  output logic [$clog2(N+1)-1:0] score,
  output logic                   raw_detect,
  output logic                   data_out,
  output logic                   ref_valid,
  output logic [N-1:0]           ref_q       // reference in use
);

  logic [N-1:0]     in_q, ref_sr, match;
  logic [DELAY-1:0] delay_q;
  logic [4:0]       valid_q;   // ref_valid aligned with the summer and detector
  logic             hit;

  shift_reg #(.WIDTH(N)) u_in_reg (
    .clk, .rst_n, .en(1'b1), .din(din), .q(in_q)
  );

  shift_reg #(.WIDTH(N)) u_ref_reg (
    .clk, .rst_n, .en(ref_shift), .din(ref_din), .q(ref_sr)
  );

  ref_latch #(.WIDTH(N)) u_latch (
    .clk, .rst_n, .load(ref_load), .d(ref_sr), .q(ref_q), .valid(ref_valid)
  );

  // One-bit multiplication at each position: a one where data and reference agree.
  assign match = ~(in_q ^ ref_q);

  pipelined_summer #(.N(N)) u_summer (
    .clk, .rst_n, .vec(match), .sum(score)
  );

  threshold_detector #(.N(N)) u_det (
    .clk, .rst_n, .score(score), .thresh(thresh), .raw_detect(hit)
  );

  // Scores computed before the first load compare against the cleared
  // holding register; they are masked until they have left the pipeline.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_q <= '0;
    else        valid_q <= {valid_q[3:0], ref_valid};
  end

  assign raw_detect = hit & valid_q[4];

  // Delay line from the oldest input register bit to the recorder output.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) delay_q <= '0;
    else        delay_q <= {delay_q[DELAY-2:0], in_q[N-1]};
  end

  assign data_out = delay_q[DELAY-1];

endmodule
