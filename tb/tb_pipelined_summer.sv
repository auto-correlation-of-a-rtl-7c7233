// tb_pipelined_summer: self-checking test of pipelined_summer.
// Applies one vector per clock (all zeros, all ones, single bits and random
// vectors with random densities) and checks that sum equals the number of
// ones of each vector after exactly four clock edges (the first edge
// captures the vector, the fourth registers the total).
module tb_pipelined_summer;
  localparam int N = 64;
  localparam int LAT = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] vec = '0;
  logic [6:0] sum;
  int expq[$];
  int checks = 0, failures = 0;

  pipelined_summer #(.N(N)) dut (.clk, .rst_n, .vec, .sum);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] rand_vec(int density);
    logic [N-1:0] v;
    for (int b = 0; b < N; b++) v[b] = ($urandom % 64) < density;
    return v;
  endfunction

  function automatic int ones(logic [N-1:0] v);
    int c = 0;
    for (int b = 0; b < N; b++) c += int'(v[b]);
    return c;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < LAT - 1; i++) expq.push_back(0);
    for (int i = 0; i < 3000; i++) begin
      if (i == 0)            vec = '0;
      else if (i == 1)       vec = '1;
      else if (i < 2 + N)    vec = N'(1) << (i - 2);
      else                   vec = rand_vec($urandom % 65);
      expq.push_back(ones(vec));
      @(negedge clk);
      // after LAT edges (the first one captures the vector) the count is out
      begin
        automatic int e = expq.pop_front();
        if (i >= LAT - 1) begin
          checks++;
          if (int'(sum) != e) begin
            failures++;
            if (failures < 5) $display("cycle %0d: sum=%0d expected %0d", i, sum, e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
