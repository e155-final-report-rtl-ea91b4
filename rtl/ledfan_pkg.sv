// ledfan_pkg: constants and types shared by the LED-fan strip driver.
//
// The driver runs from a 40 MHz clock. An SK6812 bit is sent as four equal
// 0.3 us slots (12 clocks each): a 0 is the slot pattern 1000 (0.3 us high,
// 0.9 us low) and a 1 is 1100 (0.6 us high, 0.6 us low), so one bit takes
// 1.2 us and one 24-bit GRB pixel 28.8 us. The slot strobe comes from a
// 32-bit phase accumulator whose increment is 2^32/12. The image is 100
// columns of 10 pixels, stored column by column in three 8-bit colour planes.
// The sizes, slot patterns and accumulator scheme are the original design's;
// the 40 MHz clock is inferred from its accumulator increments.
package ledfan_pkg;

  localparam int unsigned NUM_LEDS      = 10;    // LEDs on the blade
  localparam int unsigned NUM_COLS      = 100;   // columns in one image
  localparam int unsigned COLOR_W       = 8;     // bits per colour channel
  localparam int unsigned WORD_W        = 3 * COLOR_W;  // bits per pixel (GRB)
  localparam int unsigned SLOTS_PER_BIT = 4;     // 0.3 us slots in one 1.2 us bit

  localparam int unsigned ACC_W    = 32;
  localparam logic [31:0] SLOT_INC = 32'h1555_5555;  // 2^32/12: one strobe per 12 clocks

  // Slot patterns, sent most significant slot first.
  localparam logic [3:0] CODE0 = 4'b1000;
  localparam logic [3:0] CODE1 = 4'b1100;

  // Pixel as the SK6812 expects it on the wire: green, red, blue, MSB first.
  typedef struct packed {
    logic [COLOR_W-1:0] g;
    logic [COLOR_W-1:0] r;
    logic [COLOR_W-1:0] b;
  } grb_t;

endpackage
