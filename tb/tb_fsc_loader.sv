// tb_fsc_loader: self-checking test of fsc_loader.
// Collects the bits shifted out after reset and after a start pulse and
// checks that they are the 64-bit code, MSB first, that ref_load follows the
// 64th bit for exactly one clock, and that a start while busy is ignored.
module tb_fsc_loader;
  localparam logic [63:0] CODE = 64'hA5C3_0F1E_2D3C_4B5A;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic ref_shift, ref_din, ref_load, busy;
  int checks = 0, failures = 0;

  fsc_loader #(.FSC(CODE)) dut (.clk, .rst_n, .start, .ref_shift, .ref_din, .ref_load, .busy);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watch one load sequence from the clock after its start: 64 shift clocks,
  // then ref_load.
  task automatic watch_load(input logic poke_start_mid);
    logic [63:0] got = '0;
    int nbits = 0, clocks = 0, loads = 0;
    while (!ref_load && clocks < 200) begin
      if (ref_shift) begin
        got = {got[62:0], ref_din};
        nbits++;
      end
      if (poke_start_mid && nbits == 20) start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      clocks++;
    end
    while (ref_load) begin
      loads++;
      checks++;
      if (ref_shift) failures++;
      @(negedge clk);
    end
    checks++;
    if (got !== CODE || nbits != 64) begin
      failures++;
      $display("shifted %0d bits %h", nbits, got);
    end
    checks++;
    if (loads != 1) begin
      failures++;
      $display("ref_load high for %0d clocks", loads);
    end
    checks++;
    if (clocks != 64) begin
      failures++;
      $display("ref_load after %0d clocks", clocks);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);        // first edge after reset starts the automatic load
    watch_load(1'b0);
    repeat (3) @(negedge clk);
    checks++;
    if (busy || ref_shift || ref_load) failures++;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    watch_load(1'b1);      // a start while busy must not restart the sequence
    repeat (80) begin
      @(negedge clk);
      checks++;
      if (busy || ref_shift || ref_load) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
