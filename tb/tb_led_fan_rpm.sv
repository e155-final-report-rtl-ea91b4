// tb_led_fan_rpm: runs the LED-fan driver, at its default size, as the fan
// runs it: loads every 800 us (100 us pulse + 700 us) and a Hall-sensor
// window once per revolution that the microcontroller loop polls after each
// load, sending a 100 us reset when it sees it.
//
// Three speeds are played, one revolution-set each: 670 RPM (the tuned
// speed, about 112 loads per revolution, so the image wraps and repeats its
// first columns), 600 RPM (more wrap) and 760 RPM (about 98 loads, so the
// last columns are never shown). For every load the strip model must latch
// the column that follows from the number of loads since the last reset,
// modulo 100, with every LED correct; loads per revolution must match the
// rotation period. Counts revolutions with wrap and with truncation and fails
// if either never happened.
module tb_led_fan_rpm;
  localparam int NUM_LEDS = 10;
  localparam int NUM_COLS = 100;
  localparam int NUM_PIX  = NUM_LEDS * NUM_COLS;
  localparam int US       = 40;            // clocks per microsecond
  localparam int HALL_WINDOW_US = 850;     // magnet over the sensor: longer than one
                                           // 800 us poll, shorter than 900 us (poll + reset)

  logic clk = 1'b0;
  logic reset = 1'b0;
  logic load = 1'b0;
  logic wave_out;

  logic [NUM_LEDS-1:0][23:0] shown;
  int latches, timing_errors, overflow_bits, last_frame_bits;

  int checks = 0;
  int failures = 0;
  int n_wrap_revs = 0, n_short_revs = 0, n_revs = 0;

  led_fan_top dut (.clk, .reset, .load, .wave_out);

  sk6812_strip_model #(.N(NUM_LEDS), .SAMPLE_NS(25.0)) strip (
    .clk, .din(wave_out), .shown, .latches, .timing_errors, .overflow_bits, .last_frame_bits
  );

  always #1 clk = ~clk;

  logic [7:0] img_r [NUM_PIX];
  logic [7:0] img_g [NUM_PIX];
  logic [7:0] img_b [NUM_PIX];

  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // fan angle: time since the magnet last reached the sensor, in clocks
  longint unsigned rev_clocks = 89552 * US;   // 670 RPM
  longint unsigned angle = 0;
  logic hall_low;
  always @(posedge clk) angle <= (angle + 1 >= rev_clocks) ? 0 : angle + 1;
  assign hall_low = angle < longint'(HALL_WINDOW_US * US);

  task automatic wait_us(int us);
    repeat (us * US) @(posedge clk);
  endtask

  task automatic pulse(ref logic pin, input int us);
    pin = 1'b1;
    wait_us(us);
    pin = 1'b0;
  endtask

  task automatic check_column(int col, int l0);
    checks++;
    if (latches != l0 + 1 || last_frame_bits != NUM_LEDS * 24) begin
      failures++;
      $display("column %0d: %0d latches, %0d bits", col, latches - l0, last_frame_bits);
      return;
    end
    for (int i = 0; i < NUM_LEDS; i++) begin
      int a;
      a = col * NUM_LEDS + i;
      checks++;
      if (shown[i] !== {img_g[a], img_r[a], img_b[a]}) begin
        failures++;
        if (failures < 10) $display("column %0d LED %0d shows %h", col, i, shown[i]);
      end
    end
  endtask

  // Firmware main loop for a number of revolutions at one speed.
  task automatic spin(int rpm, int revs);
    int col, loads, l0, expect_loads;
    longint unsigned period_us;
    period_us = 60_000_000 / rpm;
    rev_clocks = period_us * US;
    angle = rev_clocks / 2;            // start half a turn from the magnet
    // run until the first revolution mark, then count whole revolutions
    col = -1;
    loads = 0;
    for (int r = 0; r <= revs; ) begin
      l0 = latches;
      pulse(load, 100);
      wait_us(700);
      if (col >= 0) begin
        check_column(col % NUM_COLS, l0);
        col++;
      end
      loads++;
      if (hall_low) begin
        if (r > 0) begin
          // a full revolution since the last mark
          expect_loads = int'(period_us / 800);
          checks++;
          if (loads < expect_loads - 1 || loads > expect_loads + 1) begin
            failures++;
            $display("%0d RPM: %0d loads in a revolution, expected about %0d", rpm, loads, expect_loads);
          end
          if (loads > NUM_COLS) n_wrap_revs++;
          if (loads < NUM_COLS) n_short_revs++;
          n_revs++;
          $display("%0d RPM: revolution with %0d loads", rpm, loads);
        end
        pulse(reset, 100);
        col = 0;
        loads = 0;
        r++;
      end
    end
  endtask

  initial begin
    $readmemh("rtl/img_red.hex", img_r);
    $readmemh("rtl/img_grn.hex", img_g);
    $readmemh("rtl/img_blu.hex", img_b);
    wait_us(1);
    pulse(reset, 100);
    wait_us(2000);
    spin(670, 1);
    spin(600, 1);
    spin(760, 1);
    checks++;
    if (timing_errors != 0 || overflow_bits != 0) begin
      failures++;
      $display("%0d timing errors, %0d surplus bits", timing_errors, overflow_bits);
    end
    $display("revolutions %0d, with wrap %0d, truncated %0d", n_revs, n_wrap_revs, n_short_revs);
    checks += 2;
    if (n_wrap_revs == 0)  begin failures++; $display("no revolution wrapped the image"); end
    if (n_short_revs == 0) begin failures++; $display("no revolution was cut short"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
