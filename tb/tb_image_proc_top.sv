// tb_image_proc_top: end-to-end test of the image pipeline at its default
// size (one 160 x 106 RGB image).
//
// 1. Loads a generated test image through the loading port: red ramps
//    across each row, green down the columns, blue is random, and a few
//    pixels are set to black, white and the primaries.
// 2. Scans the image three times in a row, selecting Y, Cb and Cr on the
//    8-bit output in turn, as when the three component images are written
//    out. Random clocks have run low (stalls), and now and then a pixel
//    far ahead of the scan is rewritten while scanning, which takes the
//    memory port away from the scan for that clock.
// Every clock the testbench checks that out_valid follows a read request
// exactly three clocks later, that pixels come out in raster order with
// the right index and end-of-image flag, that each component is within
// 0.6 LSB of the conversion computed in real arithmetic, and that w_data
// carries the selected component. It counts each mechanism (loads, stalls,
// scan paused by a load, image wraps, each component selection) and fails
// if one never happened.
`timescale 1ns/1ps
module tb_image_proc_top;
  import ip_pkg::*;

  localparam int W     = ip_pkg::IMG_W;
  localparam int H     = ip_pkg::IMG_H;
  localparam int DEPTH = W * H;
  localparam int AW    = $clog2(DEPTH);
  localparam int LAT   = 3;
  localparam int FRAMES = 3;
  localparam int MAX_CYCLES = DEPTH * (FRAMES + 2) + 10000;

  logic          clk = 1'b0;
  logic          rst_n;
  logic          load_we;
  logic [AW-1:0] load_addr;
  rgb_t          load_pix;
  logic          run;
  comp_e         comp_sel;
  logic          out_valid;
  logic [AW-1:0] out_index;
  logic          out_last;
  ycbcr_t        out_pix;
  logic [7:0]    w_data;

  always #5 clk = ~clk;

  image_proc_top dut (
    .clk(clk), .rst_n(rst_n),
    .load_we(load_we), .load_addr(load_addr), .load_pix(load_pix),
    .run(run), .comp_sel(comp_sel),
    .out_valid(out_valid), .out_index(out_index), .out_last(out_last),
    .out_pix(out_pix), .w_data(w_data)
  );

  rgb_t image [DEPTH];
  logic req_hist [LAT];
  int   exp_index = 0;
  int   checks = 0, failures = 0;
  int   n_loads = 0, n_stalls = 0, n_load_pauses = 0, n_wraps = 0;
  int   n_comp [3] = '{0, 0, 0};
  int   n_read_reqs = 0;

  function automatic real ref_comp(int c, rgb_t p);
    case (c)
      0:       return  16.0 + 0.184 * p.r + 0.614 * p.g + 0.062 * p.b;
      1:       return 128.0 - 0.101 * p.r - 0.339 * p.g + 0.439 * p.b;
      default: return 128.0 + 0.439 * p.r - 0.399 * p.g - 0.040 * p.b;
    endcase
  endfunction

  function automatic int got_comp(int c, ycbcr_t q);
    return (c == 0) ? int'(q.y) : (c == 1) ? int'(q.cb) : int'(q.cr);
  endfunction

  task automatic fail(string msg);
    failures++;
    if (failures <= 20) $display("FAIL %s", msg);
  endtask

  // Check what the outputs show in the clock that has just begun.
  task automatic check_outputs();
    real e;
    int  sel;
    checks++;
    if (out_valid !== req_hist[LAT-1])
      fail($sformatf("out_valid=%0b, expected %0b", out_valid, req_hist[LAT-1]));
    if (out_valid) begin
      checks++;
      if (int'(out_index) != exp_index)
        fail($sformatf("out_index=%0d expected %0d", out_index, exp_index));
      checks++;
      if (out_last !== (exp_index == DEPTH - 1))
        fail($sformatf("out_last=%0b at index %0d", out_last, exp_index));
      for (int c = 0; c < 3; c++) begin
        e = ref_comp(c, image[exp_index]);
        checks++;
        if (real'(got_comp(c, out_pix)) - e > 0.6 || e - real'(got_comp(c, out_pix)) > 0.6)
          fail($sformatf("pixel %0d comp %0d: got %0d expected %f",
                         exp_index, c, got_comp(c, out_pix), e));
      end
      sel = int'(comp_sel);
      checks++;
      if (int'(w_data) != got_comp(sel, out_pix))
        fail($sformatf("w_data=%0d for selection %0d", w_data, sel));
      n_comp[sel]++;
      if (out_last) n_wraps++;
      exp_index = (exp_index == DEPTH - 1) ? 0 : exp_index + 1;
    end else begin
      checks++;
      if (out_last) fail("out_last without out_valid");
    end
  endtask

  // One clock: apply inputs, clock, record the read request, check outputs.
  task automatic tick(logic r, logic we, int wa, rgb_t wp);
    logic req;
    req = r && !we;
    run <= r; load_we <= we; load_addr <= AW'(wa); load_pix <= wp;
    if (we) begin
      image[wa] = wp;
      n_loads++;
      if (r) n_load_pauses++;
    end
    if (req) n_read_reqs++;
    @(posedge clk);
    #1;
    for (int k = LAT - 1; k > 0; k--) req_hist[k] = req_hist[k-1];
    req_hist[0] = req;
    check_outputs();
  endtask

  function automatic rgb_t test_pixel(int idx);
    rgb_t p;
    int x, y;
    x = idx % W;
    y = idx / W;
    p.r = 8'((x * 255) / (W - 1));
    p.g = 8'((y * 255) / (H - 1));
    p.b = 8'($urandom);
    case (idx)
      0:         p = '{8'd0,   8'd0,   8'd0};
      1:         p = '{8'd255, 8'd255, 8'd255};
      2:         p = '{8'd255, 8'd0,   8'd0};
      3:         p = '{8'd0,   8'd255, 8'd0};
      4:         p = '{8'd0,   8'd0,   8'd255};
      DEPTH - 1: p = '{8'd255, 8'd0,   8'd255};
      default: ;
    endcase
    return p;
  endfunction

  initial begin
    int frame;
    rst_n = 1'b0; run = 1'b0; load_we = 1'b0; load_addr = '0; load_pix = '0;
    comp_sel = COMP_Y;
    for (int k = 0; k < LAT; k++) req_hist[k] = 1'b0;
    repeat (4) @(posedge clk);
    #1 rst_n = 1'b1;

    // Load the whole image, scan idle.
    for (int a = 0; a < DEPTH; a++) tick(1'b0, 1'b1, a, test_pixel(a));
    repeat (4) tick(1'b0, 1'b0, 0, '0);

    // Scan FRAMES images, one component selection per image.
    frame = 0;
    while (frame < FRAMES) begin
      int pos;
      comp_sel = comp_e'(frame);
      pos = n_read_reqs % DEPTH;
      if (($urandom % 16) == 0) begin
        tick(1'b0, 1'b0, 0, '0);
        n_stalls++;
      end else if (($urandom % 64) == 0) begin
        tick(1'b1, 1'b1, (pos + 5000) % DEPTH, rgb_t'($urandom));
      end else begin
        tick(1'b1, 1'b0, 0, '0);
      end
      // Move to the next selection once this image's last pixel has left.
      if (out_valid && out_last) frame++;
    end
    repeat (LAT + 2) tick(1'b0, 1'b0, 0, '0);

    checks++;
    if (n_wraps != FRAMES) fail($sformatf("%0d images scanned, expected %0d", n_wraps, FRAMES));
    checks++;
    if (n_stalls == 0) fail("no stall happened");
    checks++;
    if (n_load_pauses == 0) fail("no load during a scan happened");
    for (int c = 0; c < 3; c++) begin
      checks++;
      if (n_comp[c] == 0) fail($sformatf("component %0d never selected", c));
    end
    $display("mechanisms: loads=%0d stalls=%0d load_pauses=%0d wraps=%0d sel_y=%0d sel_cb=%0d sel_cr=%0d",
             n_loads, n_stalls, n_load_pauses, n_wraps, n_comp[0], n_comp[1], n_comp[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
