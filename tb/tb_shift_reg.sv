// tb_shift_reg: self-checking test of shift_reg.
// Shifts random bits with a random enable and compares q, after every clock,
// with a reference model kept as a 64-bit vector in the testbench.
module tb_shift_reg;
  localparam int W = 64;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, din = 1'b0;
  logic [W-1:0] q, model;
  int checks = 0, failures = 0;

  shift_reg #(.WIDTH(W)) dut (.clk, .rst_n, .en, .din, .q);

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
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      en  = ($urandom % 4) != 0;
      din = 1'($urandom);
      if (en) model = {model[W-2:0], din};
      @(negedge clk);
      checks++;
      if (q !== model) begin
        failures++;
        if (failures < 5) $display("mismatch at %0d: q=%h model=%h", i, q, model);
      end
      en = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
