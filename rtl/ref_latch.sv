// ref_latch: reference holding register of the correlator.
//
// While load is high the register follows the reference shift register, so
// the correlator sees the reference as it is being loaded; while load is low
// it holds its contents, and the reference shift register may be refilled
// with a new code without disturbing the correlation in progress.  The
// original part is a level-sensitive transparent latch; here it is a
// clock-enabled register (one clock later than a latch would be), which keeps
// the design free of latches and in a single clock domain.  valid goes high
// at the first load and stays high until reset.
module ref_latch #(
  parameter int unsigned WIDTH = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q,
  output logic             valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q     <= '0;
      valid <= 1'b0;
    end else if (load) begin
      q     <= d;
      valid <= 1'b1;
    end
  end

endmodule
