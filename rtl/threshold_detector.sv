// threshold_detector: decides whether a correlation score is a sync.
//
// thresh is the number of bit errors allowed in the frame sync code (0 to 3).
// The threshold code is registered, and raw_detect is raised for one clock
// for every score with score >= N - thresh, i.e. N matching bits for
// threshold 0 down to N-3 for threshold 3.  A score under the threshold at
// the expected sync position becomes a loss pulse in the flywheel.
//
// Timing: raw_detect reflects the score one clock after it is presented; a
// new threshold takes effect one clock later than that.
module threshold_detector #(
  parameter int unsigned N = 64
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [$clog2(N+1)-1:0] score,
  input  logic [1:0]             thresh,
  output logic                   raw_detect
);

  localparam int unsigned WS = $clog2(N + 1);

  logic [1:0] thresh_reg;
  logic       hit;

  assign hit = score >= WS'(N) - WS'(thresh_reg);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      thresh_reg <= '0;
      raw_detect <= 1'b0;
    end else begin
      thresh_reg <= thresh;
      raw_detect <= hit;
    end
  end

endmodule
