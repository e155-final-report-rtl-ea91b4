// tb_sk6812_tx: drives the transmitter with a 12-clock slot strobe and random
// GRB words, decodes the line by measuring high times in clocks (12 = 0 bit,
// 24 = 1 bit) and compares the decoded bits, MSB first, with the words sent.
// Checks the 48-clock bit period, that back-to-back words leave no gap
// (one word per 1152 clocks), that the line stays low when idle, and that
// reset silences the line at once.
module tb_sk6812_tx;
  import ledfan_pkg::*;

  localparam int SLOT = 12;
  localparam int NWORDS = 40;

  logic clk = 1'b0;
  logic rst;
  logic slot_tick;
  grb_t word;
  logic word_valid, word_ready, busy, dout;
  int   checks = 0;
  int   failures = 0;

  sk6812_tx dut (.*);

  always #12.5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // slot strobe: every SLOT clocks
  int slot_cnt;
  always_ff @(posedge clk) begin
    if (rst) slot_cnt <= 0;
    else slot_cnt <= (slot_cnt == SLOT - 1) ? 0 : slot_cnt + 1;
  end
  assign slot_tick = !rst && slot_cnt == SLOT - 1;

  // expected bit stream
  bit exp_bits[$];
  int take_times[$];
  longint unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (!rst && word_valid && word_ready) begin
      for (int i = WORD_W - 1; i >= 0; i--) exp_bits.push_back(word[i]);
      take_times.push_back(int'(cyc));
    end
  end

  // line decoder
  int  high_len = 0;
  int  last_rise = -1;
  int  nbits = 0;
  bit  dprev = 1'b0;
  bit  decode_on = 1'b1;
  always @(posedge clk) begin
    if (decode_on) begin
      if (dout && !dprev) begin
        if (last_rise >= 0 && int'(cyc) - last_rise < 1000) begin
          checks++;
          if (int'(cyc) - last_rise != 4 * SLOT) begin
            failures++;
            $display("bit period %0d clocks, expected %0d at clock %0d bit %0d", int'(cyc) - last_rise, 4 * SLOT, cyc, nbits);
          end
        end
        last_rise = int'(cyc);
        high_len = 1;
      end else if (dout) begin
        high_len++;
      end else if (!dout && dprev) begin
        bit b;
        checks++;
        if (high_len == SLOT) b = 1'b0;
        else if (high_len == 2 * SLOT) b = 1'b1;
        else begin
          failures++;
          $display("high time %0d clocks", high_len);
          b = 1'b0;
        end
        if (exp_bits.size() == 0) begin
          failures++;
          $display("unexpected bit on the line");
        end else begin
          bit e;
          e = exp_bits.pop_front();
          checks++;
          if (b != e) begin
            failures++;
            if (failures < 10) $display("bit %0d: got %b expected %b", nbits, b, e);
          end
        end
        nbits++;
      end
    end
    dprev = dout;
  end

  task automatic send_words(int n);
    for (int k = 0; k < n; k++) begin
      word = grb_t'($urandom());
      if (k == 0) word = '{g: 8'hFF, r: 8'h00, b: 8'hA5};
      word_valid = 1'b1;
      do @(posedge clk); while (!word_ready);
      #1;
    end
    word_valid = 1'b0;
  endtask

  initial begin
    rst = 1'b1;
    word_valid = 1'b0;
    word = '0;
    repeat (5) @(posedge clk);
    #1 rst = 1'b0;
    // idle line stays low
    repeat (200) begin
      @(posedge clk);
      checks++;
      if (dout !== 1'b0 || busy) begin
        failures++;
        $display("line not idle");
      end
    end
    // a burst of back-to-back words
    send_words(NWORDS / 2);
    wait (!busy);
    repeat (3) @(posedge clk);
    last_rise = -1;
    checks++;
    if (exp_bits.size() != 0) begin
      failures++;
      $display("%0d bits missing after first burst", exp_bits.size());
    end
    // back-to-back spacing: one word per 24 bits of 4 slots
    for (int i = 1; i < take_times.size(); i++) begin
      checks++;
      if (take_times[i] - take_times[i-1] != WORD_W * 4 * SLOT) begin
        failures++;
        $display("words %0d and %0d taken %0d clocks apart", i - 1, i,
                 take_times[i] - take_times[i-1]);
      end
    end
    take_times.delete();
    // idle gap, then a second burst
    repeat (500) begin
      @(posedge clk);
      checks++;
      if (dout !== 1'b0) begin
        failures++;
        $display("line high while idle");
      end
    end
    send_words(NWORDS / 2);
    wait (!busy);
    repeat (3) @(posedge clk);
    last_rise = -1;
    checks++;
    if (exp_bits.size() != 0 || nbits != NWORDS * WORD_W) begin
      failures++;
      $display("decoded %0d bits, expected %0d", nbits, NWORDS * WORD_W);
    end
    // reset during a word silences the line
    word = '{g: 8'hFF, r: 8'hFF, b: 8'hFF};
    word_valid = 1'b1;
    do @(posedge clk); while (!word_ready);
    #1 word_valid = 1'b0;
    repeat (30) @(posedge clk);
    decode_on = 1'b0;
    #1 rst = 1'b1;
    @(posedge clk);
    #1;
    checks++;
    if (dout !== 1'b0 || busy) begin
      failures++;
      $display("reset did not clear the line");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
