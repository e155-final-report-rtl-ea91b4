// slot_timer: phase-accumulator strobe generator for the SK6812 waveform slots.
//
// Each clock the accumulator adds INC; the carry out of the top bit is the
// strobe, so the strobe rate is clk * INC / 2^ACC_W. With the default
// INC = 2^32/12 and a 40 MHz clock this is one strobe every 12 clocks (0.3 us,
// the quarter-bit slot of the strip protocol). Because 12*INC falls 4 short of
// 2^32, the first interval after a clear is 13 clocks and one interval in
// about 89 million is 13 clocks; all others are 12. The accumulator scheme
// follows the document; clearing it from the strip reset is this design's
// choice.
//
// Interface: clear (synchronous, active high) zeroes the accumulator; tick is
// a registered one-clock pulse.
module slot_timer #(
  parameter int unsigned     ACC_W = 32,
  parameter logic [ACC_W-1:0] INC  = 32'h1555_5555
) (
  input  logic clk,
  input  logic clear,
  output logic tick
);

  logic [ACC_W-1:0] acc;

  always_ff @(posedge clk) begin
    if (clear) begin
      acc  <= '0;
      tick <= 1'b0;
    end else begin
      {tick, acc} <= {1'b0, acc} + {1'b0, INC};
    end
  end

endmodule
