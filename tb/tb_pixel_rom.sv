// tb_pixel_rom: reads every address of each colour plane, in order and in a
// shuffled order, and compares the registered output, one clock after the
// address, with the image files read independently by the testbench. Before
// each clock edge it also checks that the output still shows the previous
// address (one clock of read latency) and that it holds while the address
// holds.
module tb_pixel_rom;
  localparam int DEPTH = 1000;

  logic       clk = 1'b0;
  logic [9:0] addr;
  logic [7:0] data_r, data_g, data_b;
  logic [7:0] ref_r [DEPTH];
  logic [7:0] ref_g [DEPTH];
  logic [7:0] ref_b [DEPTH];
  int checks = 0;
  int failures = 0;
  int prev = 0;

  pixel_rom #(.INIT_FILE("rtl/img_red.hex")) u_r (.clk, .addr, .data(data_r));
  pixel_rom #(.INIT_FILE("rtl/img_grn.hex")) u_g (.clk, .addr, .data(data_g));
  pixel_rom #(.INIT_FILE("rtl/img_blu.hex")) u_b (.clk, .addr, .data(data_b));

  always #12.5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_addr(int a);
    addr = 10'(a);
    #1;
    checks++;
    if (data_r !== ref_r[prev] || data_g !== ref_g[prev] || data_b !== ref_b[prev]) begin
      failures++;
      if (failures < 10) $display("addr %0d: output changed before the clock edge", a);
    end
    prev = a;
    @(posedge clk);
    #1;
    checks++;
    if (data_r !== ref_r[a] || data_g !== ref_g[a] || data_b !== ref_b[a]) begin
      failures++;
      if (failures < 10)
        $display("addr %0d: got %h %h %h expected %h %h %h", a, data_r, data_g, data_b,
                 ref_r[a], ref_g[a], ref_b[a]);
    end
  endtask

  initial begin
    int perm [DEPTH];
    int nonzero;
    $readmemh("rtl/img_red.hex", ref_r);
    $readmemh("rtl/img_grn.hex", ref_g);
    $readmemh("rtl/img_blu.hex", ref_b);
    nonzero = 0;
    for (int i = 0; i < DEPTH; i++) if (ref_r[i] != 0 || ref_g[i] != 0 || ref_b[i] != 0) nonzero++;
    checks++;
    if (nonzero < 50) begin
      failures++;
      $display("reference image nearly empty");
    end
    addr = '0;
    @(posedge clk);
    #1;
    for (int i = 0; i < DEPTH; i++) check_addr(i);
    // shuffled order (stride coprime with 1000)
    for (int i = 0; i < DEPTH; i++) perm[i] = (i * 337 + 11) % DEPTH;
    for (int i = 0; i < DEPTH; i++) check_addr(perm[i]);
    // the output holds while the address holds
    check_addr(523);
    check_addr(523);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
