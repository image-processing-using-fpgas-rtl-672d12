// addr_gen: free-running address counter that scans the image memory.
//
// While en is high the counter steps through 0, 1, ..., DEPTH-1 and wraps
// to 0, one address per clock, so the image is read out in raster order
// over and over. While en is low it holds (a stall). rst_n (active low,
// synchronous) returns it to address 0. The framework names the counter
// and its sequential order; enable, reset and the end-of-image flag are
// this design's own additions.
//
// Outputs: addr is the current address (a register). last is high while
// addr is DEPTH-1, i.e. on the last pixel of an image; with en high the
// counter wraps on the next clock.
module addr_gen #(
  parameter int unsigned DEPTH = ip_pkg::IMG_PIXELS,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  output logic [AW-1:0] addr,
  output logic          last
);

  localparam logic [AW-1:0] LAST_ADDR = AW'(DEPTH - 1);

  assign last = (addr == LAST_ADDR);

  always_ff @(posedge clk) begin
    if (!rst_n)    addr <= '0;
    else if (en)   addr <= last ? '0 : addr + 1'b1;
  end

endmodule
