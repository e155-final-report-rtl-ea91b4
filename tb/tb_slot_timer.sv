// tb_slot_timer: checks the phase-accumulator strobe against a reference
// computed with 64-bit arithmetic (a strobe at clock n exactly when
// floor(n*INC / 2^32) steps up), checks the 12-clock slot spacing, and checks
// that clear restarts the sequence.
module tb_slot_timer;
  localparam logic [31:0] INC = 32'h1555_5555;

  logic clk = 1'b0;
  logic clear;
  logic tick;
  int   checks = 0;
  int   failures = 0;

  slot_timer #(.ACC_W(32), .INC(INC)) dut (.clk, .clear, .tick);

  always #12.5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected strobe after n clocks since clear.
  function automatic logic ref_tick(longint unsigned n);
    return ((n * 64'(INC)) >> 32) != (((n - 1) * 64'(INC)) >> 32);
  endfunction

  task automatic run(int cycles);
    longint unsigned n;
    int last, gap12, gap13;
    last = 0; gap12 = 0; gap13 = 0;
    clear = 1'b1;
    @(posedge clk);
    #1 clear = 1'b0;
    for (n = 1; n <= longint'(cycles); n++) begin
      @(posedge clk);
      #1;
      checks++;
      if (tick !== ref_tick(n)) begin
        failures++;
        if (failures < 10) $display("clock %0d: tick=%b expected %b", n, tick, ref_tick(n));
      end
      if (tick) begin
        if (last != 0) begin
          checks++;
          if (int'(n) - last == 12) gap12++;
          else begin
            failures++;
            $display("slot gap %0d clocks at clock %0d, expected 12", int'(n) - last, n);
          end
        end else begin
          checks++;
          if (n == 13) gap13++;
          else begin
            failures++;
            $display("first slot after clear at clock %0d, expected 13", n);
          end
        end
        last = int'(n);
      end
    end
    checks++;
    if (gap12 < cycles / 12 - 3) begin
      failures++;
      $display("only %0d 12-clock slots in %0d clocks", gap12, cycles);
    end
  endtask

  initial begin
    clear = 1'b1;
    run(5000);
    // clear in the middle of a slot restarts the phase
    repeat (5) @(posedge clk);
    run(3000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
