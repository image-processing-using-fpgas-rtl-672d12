// tb_image_init: checks the preload path of the image pipeline.
//
// A small 8 x 4 image is placed in the image memory from a hex file at
// start-up (one 24-bit RGB word per line, R in the top byte) instead of
// through the loading port. The file's contents follow a formula, which
// the testbench recomputes for its reference:
//   pixel i at column x = i % 8, row y = i / 8:
//   R = 32 x + 7, G = 60 y + 3, B = (37 i) mod 256.
// The testbench scans the image twice without stalls and checks that the
// converted pixels come out in order, one per clock after the 3-clock
// latency, each component within 0.6 LSB of the real-valued conversion.
`timescale 1ns/1ps
module tb_image_init;
  import ip_pkg::*;

  localparam int W = 8, H = 4, DEPTH = W * H, AW = $clog2(DEPTH);

  logic          clk = 1'b0;
  logic          rst_n, run;
  logic          out_valid, out_last;
  logic [AW-1:0] out_index;
  ycbcr_t        out_pix;
  logic [7:0]    w_data;

  int checks = 0, failures = 0;
  int n_out = 0, first_out_cycle = -1, cycle = 0, n_last = 0;

  always #5 clk = ~clk;

  image_proc_top #(.IMG_W(W), .IMG_H(H), .INIT_FILE("tb/test_image_8x4.hex")) dut (
    .clk(clk), .rst_n(rst_n),
    .load_we(1'b0), .load_addr('0), .load_pix('0),
    .run(run), .comp_sel(COMP_Y),
    .out_valid(out_valid), .out_index(out_index), .out_last(out_last),
    .out_pix(out_pix), .w_data(w_data)
  );

  function automatic rgb_t file_pixel(int i);
    rgb_t p;
    p.r = 8'(32 * (i % W) + 7);
    p.g = 8'(60 * (i / W) + 3);
    p.b = 8'(37 * i);
    return p;
  endfunction

  function automatic real ref_comp(int c, rgb_t p);
    case (c)
      0:       return  16.0 + 0.184 * p.r + 0.614 * p.g + 0.062 * p.b;
      1:       return 128.0 - 0.101 * p.r - 0.339 * p.g + 0.439 * p.b;
      default: return 128.0 + 0.439 * p.r - 0.399 * p.g - 0.040 * p.b;
    endcase
  endfunction

  initial begin
    real e;
    int  got, idx;
    rst_n = 1'b0; run = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    run = 1'b1;            // the scan starts with the clock edge that ends cycle 0
    while (n_out < 2 * DEPTH) begin
      @(posedge clk);
      #1;
      cycle++;
      if (out_valid) begin
        if (first_out_cycle < 0) first_out_cycle = cycle;
        idx = n_out % DEPTH;
        checks++;
        if (int'(out_index) != idx) begin
          failures++;
          $display("FAIL out_index=%0d expected %0d", out_index, idx);
        end
        for (int c = 0; c < 3; c++) begin
          e   = ref_comp(c, file_pixel(idx));
          got = (c == 0) ? out_pix.y : (c == 1) ? out_pix.cb : out_pix.cr;
          checks++;
          if (real'(got) - e > 0.6 || e - real'(got) > 0.6) begin
            failures++;
            $display("FAIL pixel %0d comp %0d: got %0d expected %f", idx, c, got, e);
          end
        end
        if (out_last) n_last++;
        n_out++;
      end else if (first_out_cycle >= 0) begin
        failures++;
        $display("FAIL gap in the output stream at cycle %0d", cycle);
      end
    end
    checks++;
    if (first_out_cycle != 3) begin
      failures++;
      $display("FAIL first pixel in cycle %0d, expected 3", first_out_cycle);
    end
    checks++;
    if (n_last != 2) begin
      failures++;
      $display("FAIL %0d end-of-image flags, expected 2", n_last);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
