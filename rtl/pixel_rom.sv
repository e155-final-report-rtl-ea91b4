// pixel_rom: one colour plane of the displayed image.
//
// A DEPTH x WIDTH read-only memory, filled at configuration time from a hex
// file with one byte per line, read synchronously: data shows mem[addr] one
// clock after addr is presented. Three of these (red, green, blue) hold a
// 100 x 10 image, column by column: address col*10 + row, so addresses 0-9
// are the first column. Sizes and layout follow the document; the file names
// are this design's.
module pixel_rom #(
  parameter int unsigned DEPTH     = 1000,
  parameter int unsigned WIDTH     = 8,
  parameter string       INIT_FILE = "rtl/img_red.hex",
  localparam int unsigned AW       = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic [AW-1:0]    addr,
  output logic [WIDTH-1:0] data
);

  logic [WIDTH-1:0] mem [DEPTH];

  initial $readmemh(INIT_FILE, mem);

  always_ff @(posedge clk) data <= mem[addr];

endmodule
