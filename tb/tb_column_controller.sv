// tb_column_controller: runs the column sequencer against a simple
// transmitter model (a word is taken on a ready strobe and keeps the
// transmitter busy for WORD_CLKS clocks). For every load it checks that
// exactly NUM_LEDS words are taken, at consecutive pixel addresses that
// continue from the previous column and wrap from the last pixel to 0; that
// the address is stable for a clock before each word is taken (memory
// latency); that col_done follows the end of transmission; that loads during
// a column are ignored; and that reset returns the next column to pixel 0.
module tb_column_controller;
  localparam int NUM_LEDS  = 10;
  localparam int NUM_COLS  = 100;
  localparam int NUM_PIX   = NUM_LEDS * NUM_COLS;
  localparam int WORD_CLKS = 48;

  logic       clk = 1'b0;
  logic       rst;
  logic       load_pulse;
  logic       word_ready;
  logic       tx_busy;
  logic [9:0] addr;
  logic       word_valid, sending, col_done, wrapped;
  int checks = 0;
  int failures = 0;

  column_controller #(.NUM_LEDS(NUM_LEDS), .NUM_COLS(NUM_COLS)) dut (.*);

  always #12.5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // transmitter model: ready strobe every 8 clocks when idle or finishing
  int busy_cnt = 0;
  int cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;
  assign word_ready = (cyc % 8 == 0) && busy_cnt <= 1;
  assign tx_busy    = busy_cnt != 0;
  always_ff @(posedge clk) begin
    if (rst) busy_cnt <= 0;
    else if (word_valid && word_ready) busy_cnt <= WORD_CLKS;
    else if (busy_cnt != 0) busy_cnt <= busy_cnt - 1;
  end

  // record taken addresses
  int   taken[$];
  logic [9:0] addr_d;
  int   n_wrapped = 0, n_done = 0;
  always @(posedge clk) begin
    if (!rst && word_valid && word_ready) begin
      taken.push_back(int'(addr));
      checks++;
      if (addr !== addr_d) begin
        failures++;
        $display("word offered one clock after the address changed");
      end
    end
    if (wrapped && !rst) n_wrapped++;
    if (col_done && !rst) begin
      n_done++;
      checks++;
      if (tx_busy) begin
        failures++;
        $display("col_done while the transmitter is busy");
      end
    end
    addr_d <= addr;
  end

  task automatic pulse_load();
    @(posedge clk);
    #1 load_pulse = 1'b1;
    @(posedge clk);
    #1 load_pulse = 1'b0;
  endtask

  task automatic do_column(int first_pix, bit extra_load);
    int d0;
    taken.delete();
    d0 = n_done;
    pulse_load();
    if (extra_load) begin
      repeat (100) @(posedge clk);
      pulse_load();           // ignored: a column is in progress
    end
    wait (n_done == d0 + 1);
    repeat (20) @(posedge clk);
    checks++;
    if (taken.size() != NUM_LEDS) begin
      failures++;
      $display("column from %0d: %0d words taken, expected %0d", first_pix, taken.size(), NUM_LEDS);
    end
    for (int i = 0; i < taken.size(); i++) begin
      checks++;
      if (taken[i] != (first_pix + i) % NUM_PIX) begin
        failures++;
        if (failures < 10) $display("column from %0d: word %0d at %0d", first_pix, i, taken[i]);
      end
    end
    checks++;
    if (sending || n_done != d0 + 1) begin
      failures++;
      $display("controller did not return to waiting");
    end
  endtask

  initial begin
    int pix;
    rst = 1'b1;
    load_pulse = 1'b0;
    repeat (4) @(posedge clk);
    #1 rst = 1'b0;
    // no load, no words
    repeat (300) @(posedge clk);
    checks++;
    if (sending || taken.size() != 0) begin
      failures++;
      $display("controller started without load");
    end
    // a whole image and two more columns: wraps once
    pix = 0;
    for (int c = 0; c < NUM_COLS + 2; c++) begin
      do_column(pix, c == 5);
      pix = (pix + NUM_LEDS) % NUM_PIX;
    end
    checks++;
    if (n_wrapped != 1) begin
      failures++;
      $display("%0d wraps, expected 1", n_wrapped);
    end
    // reset in the middle of the image restarts at pixel 0
    do_column(pix, 1'b0);
    @(posedge clk);
    #1 rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    do_column(0, 1'b0);
    do_column(NUM_LEDS, 1'b0);
    // reset during a column aborts it; next load starts at 0
    pulse_load();
    repeat (200) @(posedge clk);
    #1 rst = 1'b1;
    @(posedge clk);
    #1 rst = 1'b0;
    do_column(0, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
