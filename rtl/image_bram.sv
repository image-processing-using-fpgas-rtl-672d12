// image_bram: single-port block RAM that holds one image in raster order.
//
// Follows the framework's memory specification: 24-bit words (one RGB
// pixel, 8 bits per colour), a single port, enable tied active, write-first
// operating mode. The depth defaults to one 160 x 106 image (16960 words,
// 15 address bits); that depth, rather than a smaller fixed one, is this
// design's choice so that a whole test image fits.
//
// Contents: the image is either preloaded from a hex file (INIT_FILE, one
// 24-bit word per line, the equivalent of a memory initialisation file) or
// written through the port, one pixel per clock.
//
// Timing: synchronous read, one clock of latency. With we high the word is
// written and, write-first, also appears on dout the next clock. Addresses
// at or above DEPTH are ignored on write and read back as zero.
module image_bram #(
  parameter int unsigned DEPTH     = ip_pkg::IMG_PIXELS,
  parameter int unsigned WIDTH     = 24,
  parameter int unsigned AW        = $clog2(DEPTH),
  parameter string       INIT_FILE = ""
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (we) begin
      if (32'(addr) < DEPTH) mem[addr] <= din;
      dout <= din;
    end else if (32'(addr) < DEPTH) begin
      dout <= mem[addr];
    end else begin
      dout <= '0;
    end
  end

endmodule
