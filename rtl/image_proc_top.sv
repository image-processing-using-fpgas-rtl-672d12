// image_proc_top: image memory, address generator and RGB to YCbCr
// converter wired into one streaming pixel pipeline.
//
// An RGB image (IMG_W x IMG_H pixels, 24 bits each, raster order) sits in a
// single-port block RAM. A free-running counter reads it one pixel per
// clock; each pixel goes through the colour converter, and the converted
// pixel leaves on out_pix together with its raster index. Because the
// image file the framework writes holds one 8-bit value per pixel, w_data
// carries the one component chosen by comp_sel (Y, Cb or Cr), so running
// the image three times yields the three component images.
//
// Loading: while load_we is high the memory port belongs to the loader and
// load_pix is written at load_addr; the scan pauses (no read that clock)
// and resumes from where it stopped. An image can also be preloaded from a
// hex file through INIT_FILE.
//
// Scanning: while run is high and load_we is low, one address is read per
// clock; run low stalls the scan. After the last pixel the counter wraps
// and the image is read again.
//
// Timing: a pixel read at clock t appears on out_valid/out_pix/out_index at
// t+3 (1 clock memory read, 2 clocks conversion). out_last marks the
// output of the last pixel of the image. rst_n is active-low, synchronous.
// The memory-file loader and the pixel-stream output are this design's
// stand-ins for the offline file tools around the framework.
module image_proc_top #(
  parameter int unsigned IMG_W     = ip_pkg::IMG_W,
  parameter int unsigned IMG_H     = ip_pkg::IMG_H,
  parameter int unsigned FRAC      = ip_pkg::COEF_FRAC,
  parameter string       INIT_FILE = "",
  localparam int unsigned DEPTH    = IMG_W * IMG_H,
  localparam int unsigned AW       = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // image loading port
  input  logic          load_we,
  input  logic [AW-1:0] load_addr,
  input  ip_pkg::rgb_t          load_pix,
  // scan control
  input  logic          run,
  input  ip_pkg::comp_e         comp_sel,
  // processed pixel stream
  output logic          out_valid,
  output logic [AW-1:0] out_index,
  output logic          out_last,
  output ip_pkg::ycbcr_t        out_pix,
  output logic [7:0]    w_data
);

  logic          rd_en;
  logic [AW-1:0] scan_addr;
  logic          scan_last;
  logic [AW-1:0] mem_addr;
  ip_pkg::rgb_t  mem_dout;

  assign rd_en    = run && !load_we;
  assign mem_addr = load_we ? load_addr : scan_addr;

  addr_gen #(.DEPTH(DEPTH), .AW(AW)) u_addr_gen (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (rd_en),
    .addr  (scan_addr),
    .last  (scan_last)
  );

  image_bram #(.DEPTH(DEPTH), .WIDTH(24), .AW(AW), .INIT_FILE(INIT_FILE)) u_bram (
    .clk  (clk),
    .we   (load_we),
    .addr (mem_addr),
    .din  (load_pix),
    .dout (mem_dout)
  );

  // Read-side tags: which pixel the memory is returning, one clock later.
  logic          rd_v1;
  logic [AW-1:0] idx1, idx2, idx3;
  logic          last1, last2, last3;

  always_ff @(posedge clk) begin
    if (!rst_n) rd_v1 <= 1'b0;
    else        rd_v1 <= rd_en;
    idx1  <= scan_addr;
    last1 <= scan_last;
    idx2  <= idx1;
    last2 <= last1;
    idx3  <= idx2;
    last3 <= last2;
  end

  rgb2ycbcr #(.FRAC(FRAC)) u_csc (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (rd_v1),
    .in_pix    (mem_dout),
    .out_valid (out_valid),
    .out_pix   (out_pix)
  );

  assign out_index = idx3;
  assign out_last  = out_valid && last3;

  always_comb begin
    unique case (comp_sel)
      ip_pkg::COMP_Y:  w_data = out_pix.y;
      ip_pkg::COMP_CB: w_data = out_pix.cb;
      ip_pkg::COMP_CR: w_data = out_pix.cr;
      default: w_data = out_pix.y;
    endcase
  end

endmodule
