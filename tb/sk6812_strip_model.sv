// sk6812_strip_model: behavioural model of a chain of N SK6812 RGB LEDs, for
// testbenches only (not synthesizable hardware).
//
// The model samples the data line with the testbench clock (SAMPLE_NS per
// sample) and decodes it as the LEDs do: a high time of 0.15-0.45 us is a 0,
// 0.45-0.75 us a 1; the first 24 bits after a latch belong to the first LED,
// the next 24 to the second, and so on; bits past N*24 would be passed down
// the chain and are counted as overflow. A low time of 80 us or more is the
// reset code: every LED that received a full word shows it. Each bit is also
// checked against the datasheet: low time 0.9 +- 0.15 us after a 0, 0.6 +-
// 0.15 us after a 1, bit period 1.25 +- 0.6 us; violations are counted.
//
// Outputs: shown[i] is the GRB word LED i displays; latches counts reset
// codes that latched data; last_frame_bits is the bit count of the last
// latched frame.
module sk6812_strip_model #(
  parameter int  N         = 10,
  parameter real SAMPLE_NS = 25.0
) (
  input  logic             clk,
  input  logic             din,
  output logic [N-1:0][23:0] shown,
  output int               latches,
  output int               timing_errors,
  output int               overflow_bits,
  output int               last_frame_bits
);

  logic [23:0] acc [N];
  int   nbits = 0;
  int   high_cnt = 0;
  int   low_cnt = 0;
  int   last_high = 0;
  bit   last_bit = 1'b0;
  bit   prev = 1'b0;

  initial begin
    shown = '0;
    latches = 0;
    timing_errors = 0;
    overflow_bits = 0;
    last_frame_bits = 0;
  end

  function automatic real ns(int samples);
    return real'(samples) * SAMPLE_NS;
  endfunction

  always @(posedge clk) begin
    if (din && !prev) begin
      // rising edge: check the low time and period of the bit just ended
      if (nbits > 0 && ns(low_cnt) < 80000.0) begin
        if (last_bit ? (ns(low_cnt) < 450.0 || ns(low_cnt) > 750.0)
                     : (ns(low_cnt) < 750.0 || ns(low_cnt) > 1050.0)) timing_errors++;
        if (ns(last_high + low_cnt) < 650.0 || ns(last_high + low_cnt) > 1850.0) timing_errors++;
      end
      high_cnt = 1;
    end else if (din) begin
      high_cnt++;
    end else if (prev) begin
      // falling edge: the high time decides the bit
      bit b;
      if (ns(high_cnt) >= 150.0 && ns(high_cnt) <= 450.0) b = 1'b0;
      else if (ns(high_cnt) > 450.0 && ns(high_cnt) <= 750.0) b = 1'b1;
      else begin
        b = 1'b0;
        timing_errors++;
      end
      if (nbits < N * 24) acc[nbits / 24] = {acc[nbits / 24][22:0], b};
      else overflow_bits++;
      nbits++;
      last_high = high_cnt;
      last_bit = b;
      low_cnt = 1;
    end else begin
      low_cnt++;
      if (nbits > 0 && ns(low_cnt) >= 80000.0) begin
        for (int i = 0; i < N; i++) if ((i + 1) * 24 <= nbits) shown[i] = acc[i];
        last_frame_bits = nbits;
        latches++;
        nbits = 0;
      end
    end
    prev = din;
  end

endmodule
