// fsc_loader: loads the frame sync code into the correlator reference.
//
// The channel's frame sync code is held as eight bytes (FSC, first byte in
// the top bits).  After reset, and again on every start pulse, the loader
// shifts the 64 bits into the correlator's reference shift register, MSB of
// the first byte first, one bit per clock (ref_shift high, bit on ref_din),
// and then raises ref_load for one clock so that the reference holding
// register takes the new code.  The correlation in progress keeps using the
// old reference until that clock.  busy is high from the start until the
// clock after ref_load; a start while busy is ignored.
//
// Timing: ref_load comes N + 1 clocks after the start (after reset is
// released, N + 1 clocks after the first clock edge).  The serial loading
// sequence and the automatic load after reset are this design's choices.
module fsc_loader #(
  parameter logic [63:0] FSC = fs_pkg::FSC_DEFAULT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic ref_shift,
  output logic ref_din,
  output logic ref_load,
  output logic busy
);

  // The code as stored: eight bytes.
  logic [7:0] code_mem [8];
  always_comb
    for (int i = 0; i < 8; i++) code_mem[i] = FSC[63 - 8*i -: 8];

  logic       pending;   // a load has been requested
  logic [6:0] idx;       // bits shifted so far (0..64), 64 = load the latch

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= 1'b1;
      idx     <= '0;
      busy    <= 1'b0;
    end else if (!busy) begin
      if (pending || start) begin
        busy    <= 1'b1;
        pending <= 1'b0;
        idx     <= '0;
      end
    end else if (idx == 7'd64) begin
      busy <= 1'b0;
    end else begin
      idx <= idx + 1'b1;
    end
  end

  assign ref_shift = busy && idx < 7'd64;
  assign ref_din   = code_mem[idx[5:3]][3'd7 - idx[2:0]];
  assign ref_load  = busy && idx == 7'd64;

endmodule
