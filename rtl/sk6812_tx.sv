// sk6812_tx: serialises 24-bit GRB pixels onto the SK6812 single-wire line.
//
// A pixel is held in a shift register and sent most significant bit first
// (G7 ... G0, R7 ... R0, B7 ... B0). Every bit occupies four slots marked by
// slot_tick (0.3 us each); the current bit selects the slot pattern 1000 for
// a 0 or 1100 for a 1, and a two-bit slot counter picks the pattern bit, most
// significant first. This mux-of-two-patterns scheme is the document's.
//
// Pixels arrive on a valid/ready handshake: word_ready is high on a slot tick
// when the transmitter is idle or is in the last slot of its last bit, so a
// waiting word is taken with no gap between pixels. A word is taken when
// word_valid and word_ready are both high. When no word is offered the line is
// held low, which after 80 us the strip reads as its reset (latch) code.
//
// Timing: dout is registered and changes one clock after slot_tick. busy is
// high from the tick that takes a word until the tick that ends its last slot.
// rst is synchronous and clears the line at once.
module sk6812_tx
  import ledfan_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic slot_tick,
  input  grb_t word,
  input  logic word_valid,
  output logic word_ready,
  output logic busy,
  output logic dout
);

  logic [WORD_W-1:0]         shreg;
  logic [$clog2(WORD_W)-1:0] bitcnt;
  logic [1:0]                slot;
  logic                      last_slot;
  logic                      take;
  logic [3:0]                pattern;
  logic                      dout_next;

  assign last_slot  = busy && slot == 2'(SLOTS_PER_BIT - 1)
                           && bitcnt == $bits(bitcnt)'(WORD_W - 1);
  assign word_ready = slot_tick && (!busy || last_slot);
  assign take       = word_ready && word_valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy   <= 1'b0;
      slot   <= '0;
      bitcnt <= '0;
      shreg  <= '0;
    end else if (slot_tick) begin
      if (take) begin
        shreg  <= word;
        bitcnt <= '0;
        slot   <= '0;
        busy   <= 1'b1;
      end else if (busy) begin
        slot <= slot + 2'd1;
        if (slot == 2'(SLOTS_PER_BIT - 1)) begin
          if (bitcnt == $bits(bitcnt)'(WORD_W - 1)) begin
            busy <= 1'b0;
          end else begin
            bitcnt <= bitcnt + 1'b1;
            shreg  <= {shreg[WORD_W-2:0], 1'b0};
          end
        end
      end
    end
  end

  // Line level for the state the registers will hold after this clock.
  always_comb begin
    logic       nbusy;
    logic       nbit;
    logic [1:0] nslot;
    nbusy = busy;
    nbit  = shreg[WORD_W-1];
    nslot = slot;
    if (rst) begin
      nbusy = 1'b0;
    end else if (slot_tick) begin
      if (take) begin
        nbusy = 1'b1;
        nbit  = word[WORD_W-1];
        nslot = '0;
      end else if (busy) begin
        nslot = slot + 2'd1;
        if (slot == 2'(SLOTS_PER_BIT - 1)) begin
          if (bitcnt == $bits(bitcnt)'(WORD_W - 1)) nbusy = 1'b0;
          else                                     nbit  = shreg[WORD_W-2];
        end
      end
    end
    pattern   = nbit ? CODE1 : CODE0;
    dout_next = nbusy && pattern[2'd3 - nslot];
  end

  always_ff @(posedge clk) begin
    if (rst) dout <= 1'b0;
    else     dout <= dout_next;
  end

  // A word may only be taken at a slot boundary.
  a_take_on_tick: assert property (@(posedge clk) disable iff (rst) take |-> slot_tick);

endmodule
