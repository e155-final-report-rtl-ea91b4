// column_controller: sends one image column per load pulse.
//
// The image is NUM_COLS columns of NUM_LEDS pixels, stored column by column,
// so a column is NUM_LEDS consecutive addresses. The controller waits with
// the line idle (low) until a load pulse, then offers NUM_LEDS pixels in turn
// to the transmitter, advancing the pixel address after each one is taken.
// After the last pixel has left the transmitter it returns to waiting: the
// line stays low, which the strip takes as its reset code and latches the
// column. The address continues from where it stopped, so successive loads
// walk through the image; after the last pixel of the last column it wraps to
// 0. A reset (the microcontroller's reset pulse, once per revolution) returns
// the address to 0 so the next load sends the first column. Load pulses that
// arrive while a column is being sent are ignored.
//
// This follows the document's flow (send 10 pixels, hold the line low, wait
// for load; reset restarts the image). The explicit state machine, the
// valid/ready handshake and the one-clock fetch state that covers the pixel
// memory's read latency are this design's.
//
// Interface: load_pulse is a one-clock pulse (already synchronised). addr
// goes to the pixel memories; word_valid is high when their output belongs to
// addr; word_ready/tx_busy come from the transmitter. col_done pulses when a
// column has fully left the transmitter; wrapped pulses when the address
// wraps to 0 at the end of the image.
module column_controller #(
  parameter int unsigned NUM_LEDS = 10,
  parameter int unsigned NUM_COLS = 100,
  localparam int unsigned NUM_PIX = NUM_LEDS * NUM_COLS,
  localparam int unsigned AW      = $clog2(NUM_PIX)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          load_pulse,
  input  logic          word_ready,
  input  logic          tx_busy,
  output logic [AW-1:0] addr,
  output logic          word_valid,
  output logic          sending,
  output logic          col_done,
  output logic          wrapped
);

  typedef enum logic [1:0] {S_WAIT, S_FETCH, S_SEND, S_DRAIN} state_t;

  state_t                        state;
  logic [$clog2(NUM_LEDS+1)-1:0] led_idx;
  logic                          take;

  assign word_valid = (state == S_SEND);
  assign take       = word_valid && word_ready;
  assign sending    = (state != S_WAIT);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_WAIT;
      addr     <= '0;
      led_idx  <= '0;
      col_done <= 1'b0;
      wrapped  <= 1'b0;
    end else begin
      col_done <= 1'b0;
      wrapped  <= 1'b0;
      unique case (state)
        S_WAIT: begin
          led_idx <= '0;
          if (load_pulse) state <= S_FETCH;
        end
        S_FETCH: state <= S_SEND;
        S_SEND: begin
          if (take) begin
            if (addr == AW'(NUM_PIX - 1)) begin
              addr    <= '0;
              wrapped <= 1'b1;
            end else begin
              addr <= addr + 1'b1;
            end
            led_idx <= led_idx + 1'b1;
            state   <= (led_idx == $bits(led_idx)'(NUM_LEDS - 1)) ? S_DRAIN : S_FETCH;
          end
        end
        S_DRAIN: begin
          if (!tx_busy) begin
            state    <= S_WAIT;
            col_done <= 1'b1;
          end
        end
        default: state <= S_WAIT;
      endcase
    end
  end

  a_addr_in_range: assert property (@(posedge clk) disable iff (rst) addr < AW'(NUM_PIX));

endmodule
