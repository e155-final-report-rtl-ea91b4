// input_sync: brings an asynchronous control pin (load or reset from the
// microcontroller) into the clock domain.
//
// Two flip-flops in series remove metastability; a third holds the previous
// value so that a rising edge can be reported as a one-clock pulse. Latency
// from pin to level is two clocks, to rise three. The flip-flops have no
// reset: they settle within three clocks of power-up. The original design
// samples its pins directly; synchronising them is this design's addition.
module input_sync (
  input  logic clk,
  input  logic pin,
  output logic level,
  output logic rise
);

  logic [2:0] sh;

  always_ff @(posedge clk) sh <= {sh[1:0], pin};

  assign level = sh[1];
  assign rise  = sh[1] & ~sh[2];

endmodule
