// tb_led_fan_top: end-to-end test of the LED-fan driver at its default size
// (10 LEDs, 100 columns), with the microcontroller's pin sequence played by
// the testbench and an SK6812 strip model on the data line.
//
// The sequence follows the controller firmware: a 100 us reset pulse, 2 ms
// wait, then a loop of a 100 us load pulse followed by 765 us; once per
// "revolution" the Hall-sensor branch sends a 100 us reset. After each load
// the strip model must latch exactly the expected image column (LED i shows
// pixel col*10+i, green-red-blue) with every bit inside the datasheet
// timing. The run covers a whole image and its wrap back to column 0, a
// revolution reset in the middle of the image, a stray load during a column
// (must be ignored) and the 1.2 us bit rate (a column is 240 bits, so its
// first and last rising edges are 239*48 clocks apart at 40 MHz).
module tb_led_fan_top;
  localparam int NUM_LEDS = 10;
  localparam int NUM_COLS = 100;
  localparam int NUM_PIX  = NUM_LEDS * NUM_COLS;
  localparam int US       = 40;        // clocks per microsecond

  logic clk = 1'b0;
  logic reset = 1'b0;
  logic load = 1'b0;
  logic wave_out;

  logic [NUM_LEDS-1:0][23:0] shown;
  int latches, timing_errors, overflow_bits, last_frame_bits;

  int checks = 0;
  int failures = 0;

  // mechanisms seen
  int n_columns = 0, n_wraps = 0, n_hall_resets = 0, n_ignored_loads = 0, n_rate_checks = 0;

  led_fan_top dut (.clk, .reset, .load, .wave_out);

  sk6812_strip_model #(.N(NUM_LEDS), .SAMPLE_NS(25.0)) strip (
    .clk, .din(wave_out), .shown, .latches, .timing_errors, .overflow_bits, .last_frame_bits
  );

  always #1 clk = ~clk;    // one clock is 25 ns of the modelled hardware

  logic [7:0] img_r [NUM_PIX];
  logic [7:0] img_g [NUM_PIX];
  logic [7:0] img_b [NUM_PIX];

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // edge timing on the line
  longint unsigned cyc = 0;
  longint unsigned first_rise, last_rise;
  bit line_prev = 1'b0;
  always @(posedge clk) begin
    cyc++;
    if (wave_out && !line_prev) begin
      if (first_rise == 0) first_rise = cyc;
      last_rise = cyc;
    end
    line_prev = wave_out;
  end

  task automatic wait_us(int us);
    repeat (us * US) @(posedge clk);
  endtask

  task automatic pulse_reset();
    reset = 1'b1;
    wait_us(100);
    reset = 1'b0;
  endtask

  // one firmware loop iteration: load, wait, check the latched column
  task automatic load_column(int col, bit stray_load);
    int l0;
    l0 = latches;
    first_rise = 0;
    load = 1'b1;
    wait_us(100);
    load = 1'b0;
    if (stray_load) begin
      wait_us(50);
      load = 1'b1;
      wait_us(20);
      load = 1'b0;
      wait_us(695);
    end else begin
      wait_us(765);
    end
    checks++;
    if (latches != l0 + 1) begin
      failures++;
      $display("column %0d: %0d latches, expected 1", col, latches - l0);
      return;
    end
    checks++;
    if (last_frame_bits != NUM_LEDS * 24) begin
      failures++;
      $display("column %0d: %0d bits, expected %0d", col, last_frame_bits, NUM_LEDS * 24);
    end
    for (int i = 0; i < NUM_LEDS; i++) begin
      int a;
      logic [23:0] e;
      a = col * NUM_LEDS + i;
      e = {img_g[a], img_r[a], img_b[a]};
      checks++;
      if (shown[i] !== e) begin
        failures++;
        if (failures < 10) $display("column %0d LED %0d shows %h, expected %h", col, i, shown[i], e);
      end
    end
    checks++;
    if (last_rise - first_rise == longint'((NUM_LEDS * 24 - 1) * 48)) n_rate_checks++;
    else begin
      failures++;
      $display("column %0d took %0d clocks from first to last bit", col, last_rise - first_rise);
    end
    n_columns++;
    if (stray_load) n_ignored_loads++;
  endtask

  initial begin
    int col;
    int l_start;
    $readmemh("rtl/img_red.hex", img_r);
    $readmemh("rtl/img_grn.hex", img_g);
    $readmemh("rtl/img_blu.hex", img_b);
    wait_us(1);
    // before the first reset the FPGA state is arbitrary; the start-up reset
    // must leave the line idle until the first load
    pulse_reset();
    wait_us(100);
    l_start = latches;
    wait_us(1900);
    checks++;
    if (latches != l_start || wave_out) begin
      failures++;
      $display("line active before the first load");
    end
    // a whole image, the wrap back to column 0, and two more columns
    col = 0;
    for (int k = 0; k < NUM_COLS + 3; k++) begin
      load_column(col, k == 7);
      if (col == NUM_COLS - 1) n_wraps++;
      col = (col + 1) % NUM_COLS;
    end
    // revolution mark: Hall sensor seen, reset, image restarts
    for (int rev = 0; rev < 2; rev++) begin
      pulse_reset();
      n_hall_resets++;
      col = 0;
      for (int k = 0; k < 4 + rev * 10; k++) begin
        load_column(col, 1'b0);
        col++;
      end
    end
    checks++;
    if (timing_errors != 0 || overflow_bits != 0) begin
      failures++;
      $display("%0d timing errors, %0d surplus bits on the line", timing_errors, overflow_bits);
    end
    $display("columns %0d, wraps %0d, revolution resets %0d, ignored loads %0d, rate checks %0d",
             n_columns, n_wraps, n_hall_resets, n_ignored_loads, n_rate_checks);
    checks += 4;
    if (n_wraps == 0)         begin failures++; $display("image wrap never happened");  end
    if (n_hall_resets == 0)   begin failures++; $display("revolution reset never happened"); end
    if (n_ignored_loads == 0) begin failures++; $display("stray load never happened"); end
    if (n_rate_checks == 0)   begin failures++; $display("bit rate never checked"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
