// tb_correlator: self-checking test of the 64-bit correlator.
// Loads a reference serially, then streams random data with the reference
// code inserted with 0 to 4 bit errors under every threshold setting.  Every
// clock the testbench recounts the matching bits of the last 64 inputs and
// checks raw_detect (exactly 5 clocks after the last code bit), the score
// (4 clocks after) and data_out (input delayed by 64 + 10 - 1 clocks).  It then
// shifts a second code into the reference register without loading it,
// checks that detection still uses the first code, loads, and checks that
// the second code is detected.
module tb_correlator;
  localparam int N = 64;
  localparam int DELAY = 10;
  localparam logic [63:0] CODE_A = 64'h0C28_F22C_EA7D_0E24;
  localparam logic [63:0] CODE_B = 64'h1ACF_FC1D_5A5A_C3C3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic din = 1'b0, ref_shift = 1'b0, ref_din = 1'b0, ref_load = 1'b0;
  logic [1:0] thresh = '0;
  logic [6:0] score;
  logic raw_detect, data_out, ref_valid;
  logic [63:0] ref_q;

  int checks = 0, failures = 0, detects = 0;
  logic hist[$];          // every input bit, index = clock number
  logic [63:0] cur_ref;   // reference the correlator should be using
  int  ref_since;         // first clock at which cur_ref is in use

  correlator #(.N(N), .DELAY(DELAY)) dut (
    .clk, .rst_n, .din, .ref_shift, .ref_din, .ref_load, .thresh,
    .score, .raw_detect, .data_out, .ref_valid, .ref_q
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int count_matches(int last);
    int m = 0;
    for (int i = 0; i < N; i++) begin
      logic b = (last - i >= 0) ? hist[last - i] : 1'b0;
      m += int'(b == cur_ref[i]);
    end
    return m;
  endfunction

  // One clock: apply bit b, then check the outputs after the edge.
  task automatic clock_bit(input logic b, input logic chk, input int thr);
    int m;
    din = b;
    hist.push_back(b);
    @(negedge clk);
    if (chk) begin
      int now = hist.size() - 1;        // clock number of the edge just taken
      if (now - 5 >= ref_since + N) begin
        m = count_matches(now - 5);
        checks++;
        if (raw_detect !== (m >= N - thr)) begin
          failures++;
          if (failures < 20) $display("clk %0d: raw=%b matches=%0d thr=%0d", now, raw_detect, m, thr);
        end
        checks++;
        if (int'(score) != count_matches(now - 4)) begin
          failures++;
          if (failures < 20) $display("clk %0d: score=%0d model=%0d", now, score, count_matches(now - 4));
        end
      end
      if (now >= N + DELAY) begin
        checks++;
        if (data_out !== hist[now - N - DELAY + 1]) begin
          failures++;
          if (failures < 20) $display("clk %0d: data_out=%b", now, data_out);
        end
      end
      if (raw_detect) detects++;
    end
  endtask

  task automatic shift_ref(input logic [63:0] code);
    for (int i = 63; i >= 0; i--) begin
      ref_shift = 1'b1;
      ref_din   = code[i];
      clock_bit(1'($urandom), 1'b0, 0);
    end
    ref_shift = 1'b0;
  endtask

  task automatic send_code(input logic [63:0] code, input int errs, input int thr);
    logic [63:0] c = code;
    for (int e = 0; e < errs; e++) begin
      automatic int pos = e * 13 + int'($urandom % 10);
      c[pos] = !c[pos];
    end
    for (int i = 63; i >= 0; i--) clock_bit(c[i], 1'b1, thr);
  endtask

  task automatic random_bits(input int n, input int thr);
    for (int i = 0; i < n; i++) clock_bit(1'($urandom), 1'b1, thr);
  endtask

  initial begin
    int expected_detects;
    cur_ref = '0;
    ref_since = 1 << 30;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // no reference yet: no detect even for an all-zero stream
    for (int i = 0; i < 80; i++) clock_bit(1'b0, 1'b0, 0);
    checks++;
    if (raw_detect || ref_valid) failures++;

    shift_ref(CODE_A);
    ref_load = 1'b1;
    clock_bit(1'($urandom), 1'b0, 0);
    ref_load = 1'b0;
    cur_ref   = CODE_A;
    ref_since = hist.size();
    checks++;
    if (ref_q !== CODE_A || !ref_valid) failures++;

    expected_detects = 0;
    for (int t = 0; t < 4; t++) begin
      thresh = 2'(t);
      random_bits(100, t);
      for (int errs = 0; errs <= 4; errs++) begin
        detects = 0;
        send_code(CODE_A, errs, t);
        random_bits(10, t);
        // the code itself must be detected exactly when errs <= t
        checks++;
        if ((detects > 0) != (errs <= t)) begin
          failures++;
          $display("thresh %0d errs %0d: detects=%0d", t, errs, detects);
        end
        random_bits(60, t);
      end
    end

    // load a new code into the reference register while the old one is held
    thresh = 2'd0;
    random_bits(10, 0);
    for (int i = 63; i >= 0; i--) begin
      ref_shift = 1'b1;
      ref_din   = CODE_B[i];
      clock_bit(1'($urandom), 1'b1, 0);
    end
    ref_shift = 1'b0;
    detects = 0;
    send_code(CODE_A, 0, 0);
    random_bits(10, 0);
    checks++;
    if (detects == 0) begin
      failures++;
      $display("old code lost before load");
    end
    ref_load = 1'b1;
    clock_bit(1'($urandom), 1'b0, 0);
    ref_load = 1'b0;
    cur_ref   = CODE_B;
    ref_since = hist.size();
    random_bits(70, 0);
    detects = 0;
    send_code(CODE_B, 0, 0);
    random_bits(10, 0);
    checks++;
    if (detects == 0) begin
      failures++;
      $display("new code not detected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
