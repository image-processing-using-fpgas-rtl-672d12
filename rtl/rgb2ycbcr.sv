// rgb2ycbcr: pipelined RGB to YCbCr colour-space converter.
//
// Each output component is an offset plus a weighted sum of R, G and B:
//   Y  =  16 + 0.184 R + 0.614 G + 0.062 B
//   Cb = 128 - 0.101 R - 0.339 G + 0.439 B
//   Cr = 128 + 0.439 R - 0.399 G - 0.040 B
// The matrix and offsets are the design's specification. How they are
// computed is this design's own choice: the nine coefficients are signed
// fixed-point constants with FRAC fractional bits (rounded to nearest, see
// ip_pkg), stage 1 forms the nine products in parallel, stage 2 adds each
// row to its offset plus one half LSB and keeps the integer part, so the
// result is the exact value rounded to nearest within about 0.5 LSB plus
// the coefficient rounding error.
//
// No saturation is needed: for any 8-bit input the exact results lie in
// 15.7 .. 240.0 (Y in 16 .. 235.3), and the fixed-point constants keep them
// there; an assertion checks this in simulation.
//
// Interface: in_valid/in_pix are accepted every cycle (no back-pressure);
// out_valid/out_pix follow exactly 2 cycles later. One pixel per
// clock. rst_n (active low, synchronous) clears only the valid pipeline.
module rgb2ycbcr
  import ip_pkg::*;
#(
  parameter int unsigned FRAC = ip_pkg::COEF_FRAC  // coefficient fraction bits
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  rgb_t   in_pix,
  output logic   out_valid,
  output ycbcr_t out_pix
);

  localparam int unsigned PW = FRAC + 10;  // product: 9-bit unsigned x (FRAC+1)-bit signed
  localparam int unsigned SW = FRAC + 12;  // row sum with offset and rounding

  logic [7:0] chan [3];
  assign chan[0] = in_pix.r;
  assign chan[1] = in_pix.g;
  assign chan[2] = in_pix.b;

  logic signed [PW-1:0] prod_q [3][3];
  logic                 v_q1, v_q2;
  logic [7:0]           comp [3];

  for (genvar i = 0; i < 3; i++) begin : g_row
    for (genvar j = 0; j < 3; j++) begin : g_col
      localparam int COEF = ip_pkg::coef_fix(2'(i), 2'(j), int'(FRAC));
      localparam logic signed [PW-1:0] COEF_S = PW'(COEF);
      // Stage 1: one product per matrix entry.
      always_ff @(posedge clk) begin
        prod_q[i][j] <= COEF_S * $signed({{(PW-8){1'b0}}, chan[j]});
      end
    end

    localparam logic signed [SW-1:0] BIAS =
        SW'((OFFSET[i] * (2 ** FRAC)) + (2 ** (FRAC - 1)));
    logic signed [SW-1:0] sum;
    always_comb begin
      sum = BIAS + SW'(prod_q[i][0]) + SW'(prod_q[i][1]) + SW'(prod_q[i][2]);
    end

    // Stage 2: integer part of the rounded row sum.
    always_ff @(posedge clk) begin
      comp[i] <= sum[FRAC +: 8];
    end

    // The result never leaves 0..255, so dropping the upper bits is exact.
    always_ff @(posedge clk) begin
      if (rst_n && v_q1) begin
        assert (sum >= 0 && sum < (SW'(256) <<< FRAC))
          else $error("rgb2ycbcr: component %0d out of 8-bit range", i);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_q1 <= 1'b0;
      v_q2 <= 1'b0;
    end else begin
      v_q1 <= in_valid;
      v_q2 <= v_q1;
    end
  end

  assign out_valid  = v_q2;
  assign out_pix.y  = comp[0];
  assign out_pix.cb = comp[1];
  assign out_pix.cr = comp[2];

endmodule
