// tb_threshold_detector: self-checking test of threshold_detector.
// Sweeps every score from 0 to 64 under every threshold code, then random
// scores and thresholds, and checks raw_detect against score >= 64 - thresh,
// with the threshold register and the output register each one clock deep.
module tb_threshold_detector;
  localparam int N = 64;
  logic clk = 1'b0, rst_n = 1'b0, raw_detect;
  logic [6:0] score = '0;
  logic [1:0] thresh = '0, thresh_d = '0;
  int checks = 0, failures = 0;

  threshold_detector #(.N(N)) dut (.clk, .rst_n, .score, .thresh, .raw_detect);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic [6:0] s, input logic [1:0] t);
    logic exp;
    score  = s;
    thresh = t;
    @(negedge clk);
    // raw_detect compares the score applied one clock ago with the threshold
    // applied two clocks ago
    exp = int'(score) >= N - int'(thresh_d);
    checks++;
    if (raw_detect !== exp) begin
      failures++;
      if (failures < 5) $display("score=%0d thresh=%0d raw=%b", score, thresh_d, raw_detect);
    end
    thresh_d = t;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 4; t++) begin
      step(0, 2'(t));   // let the threshold register settle
      for (int s = 0; s <= N; s++) step(7'(s), 2'(t));
    end
    for (int i = 0; i < 2000; i++) step(7'(N - ($urandom % 8)), 2'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
