// led_fan_top: FPGA driver for a persistence-of-vision LED fan.
//
// A strip of NUM_LEDS SK6812 RGB LEDs sits on a spinning blade. A
// microcontroller watches a Hall sensor and sends two pulses: reset, once per
// revolution when the blade passes the top, and load, at a fixed interval
// tuned to the rotation speed. Each load makes this design send the next
// column of a NUM_COLS x NUM_LEDS image to the strip; reset makes the next
// load start again from the first column, so the picture stands still.
//
// Datapath: three pixel_rom colour planes, addressed together by the
// column_controller, are concatenated into a GRB word for sk6812_tx, which
// emits each bit as four 0.3 us slots timed by slot_timer. Between columns the
// line is held low, which the strip takes as its latch (reset) code. The
// structure follows the document; the input synchronisers, the handshake and
// the wrap at exactly NUM_COLS*NUM_LEDS pixels are this design's.
//
// Interface: clk is 40 MHz (the slot timing assumes it). reset and load are
// asynchronous active-high pulses; reset is used as a synchronous reset after
// synchronisation and must be pulsed once after power-up. wave_out is the
// strip's data input. A column (10 LEDs) takes 288 us on the line and is
// latched by the strip 80 us after it ends; load must not come more often
// than that.
module led_fan_top #(
  parameter int unsigned NUM_LEDS = 10,
  parameter int unsigned NUM_COLS = 100,
  parameter string       RED_FILE = "rtl/img_red.hex",
  parameter string       GRN_FILE = "rtl/img_grn.hex",
  parameter string       BLU_FILE = "rtl/img_blu.hex",
  localparam int unsigned NUM_PIX = NUM_LEDS * NUM_COLS,
  localparam int unsigned AW      = $clog2(NUM_PIX)
) (
  input  logic clk,
  input  logic reset,
  input  logic load,
  output logic wave_out
);

  logic          rst;
  logic          load_pulse;
  logic          slot_tick;
  logic [AW-1:0] addr;
  ledfan_pkg::grb_t word;
  logic          word_valid;
  logic          word_ready;
  logic          tx_busy;
  logic          sending;
  logic          col_done;
  logic          wrapped;

  input_sync u_rst_sync  (.clk, .pin(reset), .level(rst),  .rise());
  input_sync u_load_sync (.clk, .pin(load),  .level(),     .rise(load_pulse));

  slot_timer #(.ACC_W(ledfan_pkg::ACC_W), .INC(ledfan_pkg::SLOT_INC)) u_timer (
    .clk, .clear(rst), .tick(slot_tick)
  );

  pixel_rom #(.DEPTH(NUM_PIX), .WIDTH(ledfan_pkg::COLOR_W), .INIT_FILE(RED_FILE)) u_red (
    .clk, .addr, .data(word.r)
  );
  pixel_rom #(.DEPTH(NUM_PIX), .WIDTH(ledfan_pkg::COLOR_W), .INIT_FILE(GRN_FILE)) u_grn (
    .clk, .addr, .data(word.g)
  );
  pixel_rom #(.DEPTH(NUM_PIX), .WIDTH(ledfan_pkg::COLOR_W), .INIT_FILE(BLU_FILE)) u_blu (
    .clk, .addr, .data(word.b)
  );

  column_controller #(.NUM_LEDS(NUM_LEDS), .NUM_COLS(NUM_COLS)) u_ctrl (
    .clk, .rst, .load_pulse, .word_ready, .tx_busy,
    .addr, .word_valid, .sending, .col_done, .wrapped
  );

  sk6812_tx u_tx (
    .clk, .rst, .slot_tick, .word, .word_valid, .word_ready,
    .busy(tx_busy), .dout(wave_out)
  );

endmodule
