// pipelined_summer: counts the ones of an N-bit vector in four pipeline stages.
//
// The correlator applies its N-bit match vector here; the count of ones is the
// correlation score, the number of bit positions where data and reference
// agree.  The adder tree has four register stages, as the correlator
// requires:
//   stage 1: eight population counts of N/8 bits each
//   stage 2: four sums of two stage-1 counts
//   stage 3: two sums of two stage-2 sums
//   stage 4: the final sum
// The split into eight groups is this design's choice.  A new vector may be
// applied every clock; its count appears on sum after the fourth clock edge,
// counting the edge that captures the vector (latency 4, throughput 1).  Reset clears all stages.
module pipelined_summer #(
  parameter int unsigned N = 64   // must be a multiple of 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [N-1:0]             vec,
  output logic [$clog2(N+1)-1:0]   sum
);

  localparam int unsigned G  = N / 8;           // bits per group
  localparam int unsigned W1 = $clog2(G + 1);   // group count width
  localparam int unsigned W2 = W1 + 1;
  localparam int unsigned W3 = W1 + 2;
  localparam int unsigned WS = $clog2(N + 1);

  logic [7:0][W1-1:0] s1, s1_d;
  logic [3:0][W2-1:0] s2;
  logic [1:0][W3-1:0] s3;

  // Population count of each group.
  always_comb begin
    for (int g = 0; g < 8; g++) begin
      s1_d[g] = '0;
      for (int b = 0; b < int'(G); b++)
        s1_d[g] = s1_d[g] + W1'(vec[g*G + b]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1  <= '0;
      s2  <= '0;
      s3  <= '0;
      sum <= '0;
    end else begin
      s1 <= s1_d;
      for (int i = 0; i < 4; i++) s2[i] <= W2'(s1[2*i]) + W2'(s1[2*i+1]);
      for (int i = 0; i < 2; i++) s3[i] <= W3'(s2[2*i]) + W3'(s2[2*i+1]);
      sum <= WS'(s3[0]) + WS'(s3[1]);
    end
  end

  initial assert (N % 8 == 0) else $error("pipelined_summer: N must be a multiple of 8");

endmodule
