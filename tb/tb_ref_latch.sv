// tb_ref_latch: self-checking test of ref_latch.
// Random data with a random load; checks that the register follows d while
// load is high, holds it otherwise, and that valid rises at the first load.
module tb_ref_latch;
  localparam int W = 64;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, valid;
  logic [W-1:0] d = '0, q, model;
  logic model_valid;
  int checks = 0, failures = 0;

  ref_latch #(.WIDTH(W)) dut (.clk, .rst_n, .load, .d, .q, .valid);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    model_valid = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // no load for a while: must stay cleared and invalid
    for (int i = 0; i < 10; i++) begin
      d = {$urandom, $urandom};
      @(negedge clk);
      checks++;
      if (q !== '0 || valid !== 1'b0) failures++;
    end
    for (int i = 0; i < 2000; i++) begin
      d    = {$urandom, $urandom};
      load = ($urandom % 5) == 0;
      if (load) begin
        model = d;
        model_valid = 1'b1;
      end
      @(negedge clk);
      checks++;
      if (q !== model || valid !== model_valid) begin
        failures++;
        if (failures < 5) $display("mismatch at %0d: q=%h model=%h", i, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
