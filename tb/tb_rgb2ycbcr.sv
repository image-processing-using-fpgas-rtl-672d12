// tb_rgb2ycbcr: self-checking testbench for the colour converter.
//
// Feeds corner pixels (black, white, pure primaries, extremes of each
// chroma) and then random pixels with random gaps in in_valid. Every
// output is compared with the conversion worked out in real arithmetic
// from the matrix and offsets (the converter must be within 0.6 LSB of it),
// and out_valid must follow in_valid exactly 2 clocks later.
`timescale 1ns/1ps
module tb_rgb2ycbcr;
  import ip_pkg::*;

  localparam int LAT = 2;
  localparam int N_RANDOM = 20000;

  logic   clk = 1'b0;
  logic   rst_n;
  logic   in_valid;
  rgb_t   in_pix;
  logic   out_valid;
  ycbcr_t out_pix;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  rgb2ycbcr dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_pix(in_pix),
    .out_valid(out_valid), .out_pix(out_pix)
  );

  // Reference: the conversion matrix evaluated in real arithmetic.
  function automatic real ref_comp(int c, int r, int g, int b);
    case (c)
      0:       return  16.0 + 0.184 * r + 0.614 * g + 0.062 * b;
      1:       return 128.0 - 0.101 * r - 0.339 * g + 0.439 * b;
      default: return 128.0 + 0.439 * r - 0.399 * g - 0.040 * b;
    endcase
  endfunction

  // What was driven: entry k was sampled k+1 clocks ago, so entry LAT-1
  // is the input whose result must be on the outputs now.
  logic v_hist [LAT];
  rgb_t p_hist [LAT];

  task automatic check_out();
    real    e;
    int     got;
    rgb_t   p;
    checks++;
    if (out_valid !== v_hist[LAT-1]) begin
      failures++;
      $display("FAIL valid timing: out_valid=%0b expected %0b", out_valid, v_hist[LAT-1]);
    end
    if (v_hist[LAT-1]) begin
      p = p_hist[LAT-1];
      for (int c = 0; c < 3; c++) begin
        e   = ref_comp(c, p.r, p.g, p.b);
        got = (c == 0) ? out_pix.y : (c == 1) ? out_pix.cb : out_pix.cr;
        checks++;
        if (real'(got) - e > 0.6 || e - real'(got) > 0.6) begin
          failures++;
          $display("FAIL comp %0d for rgb=(%0d,%0d,%0d): got %0d expected %f",
                   c, p.r, p.g, p.b, got, e);
        end
      end
    end
  endtask

  task automatic drive(logic v, rgb_t p);
    in_valid <= v;
    in_pix   <= p;
    @(posedge clk);
    #1;
    for (int k = LAT-1; k > 0; k--) begin
      v_hist[k] = v_hist[k-1];
      p_hist[k] = p_hist[k-1];
    end
    v_hist[0] = v;
    p_hist[0] = p;
    check_out();
  endtask

  rgb_t corners [12];
  initial begin
    corners = '{'{8'd0,8'd0,8'd0}, '{8'd255,8'd255,8'd255}, '{8'd255,8'd0,8'd0},
                '{8'd0,8'd255,8'd0}, '{8'd0,8'd0,8'd255}, '{8'd255,8'd255,8'd0},
                '{8'd0,8'd255,8'd255}, '{8'd255,8'd0,8'd255}, '{8'd128,8'd128,8'd128},
                '{8'd1,8'd2,8'd3}, '{8'd255,8'd0,8'd40}, '{8'd0,8'd200,8'd255}};
  end

  initial begin
    in_valid = 1'b0;
    in_pix   = '0;
    rst_n    = 1'b0;
    for (int k = 0; k < LAT; k++) begin v_hist[k] = 1'b0; p_hist[k] = '0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    foreach (corners[k]) drive(1'b1, corners[k]);
    drive(1'b0, '0);
    for (int n = 0; n < N_RANDOM; n++) begin
      drive(($urandom % 4) != 0, rgb_t'($urandom));
    end
    repeat (LAT + 1) drive(1'b0, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_RANDOM + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
