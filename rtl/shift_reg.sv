// shift_reg: serial-in, parallel-out shift register.
//
// The correlator uses two of these, one for the incoming data stream and one
// for the correlation reference, each with its own shift enable so that the
// two can be clocked independently.  On every clock with en high the register
// shifts one place towards the MSB and takes din into bit 0, so after WIDTH
// shifts of an MSB-first word, q holds that word and q[WIDTH-1] is the oldest
// bit.  Reset clears the register (a choice of this design).
//
// Timing: q reflects din one clock after the enabled edge.
module shift_reg #(
  parameter int unsigned WIDTH = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             din,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= {q[WIDTH-2:0], din};
  end

endmodule
