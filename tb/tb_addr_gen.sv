// tb_addr_gen: self-checking testbench for the scan address counter.
//
// Two counters run side by side: one with a small depth (10), one at the
// default depth of a full image. Both get the same random enable (mostly
// high, with stalls). A reference counter in the testbench predicts addr
// and last every clock; a reset in the middle must return both to 0. The
// testbench also counts wraps and requires several on each counter.
`timescale 1ns/1ps
module tb_addr_gen;

  localparam int D_SMALL = 10;
  localparam int D_FULL  = ip_pkg::IMG_PIXELS;
  localparam int N_CYC   = 3 * D_FULL;

  logic clk = 1'b0;
  logic rst_n;
  logic en;
  logic [$clog2(D_SMALL)-1:0] a_small;
  logic [$clog2(D_FULL)-1:0]  a_full;
  logic l_small, l_full;

  int exp_small, exp_full;
  int wraps_small = 0, wraps_full = 0;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  addr_gen #(.DEPTH(D_SMALL)) dut_small (.clk(clk), .rst_n(rst_n), .en(en), .addr(a_small), .last(l_small));
  addr_gen                    dut_full  (.clk(clk), .rst_n(rst_n), .en(en), .addr(a_full),  .last(l_full));

  task automatic compare();
    checks += 2;
    if (int'(a_small) != exp_small || l_small != (exp_small == D_SMALL - 1)) begin
      failures++;
      $display("FAIL small: addr=%0d last=%0b expected %0d", a_small, l_small, exp_small);
    end
    if (int'(a_full) != exp_full || l_full != (exp_full == D_FULL - 1)) begin
      failures++;
      $display("FAIL full: addr=%0d last=%0b expected %0d", a_full, l_full, exp_full);
    end
  endtask

  task automatic step(logic r, logic e);
    rst_n <= r;
    en    <= e;
    @(posedge clk);
    #1;
    if (!r) begin
      exp_small = 0;
      exp_full  = 0;
    end else if (e) begin
      if (exp_small == D_SMALL - 1) begin exp_small = 0; wraps_small++; end
      else exp_small++;
      if (exp_full == D_FULL - 1) begin exp_full = 0; wraps_full++; end
      else exp_full++;
    end
    compare();
  endtask

  initial begin
    rst_n = 1'b0; en = 1'b0;
    step(1'b0, 1'b0);
    step(1'b0, 1'b1);   // reset wins over enable
    for (int n = 0; n < N_CYC; n++) begin
      step(n != N_CYC / 2, ($urandom % 8) != 0);
    end
    checks++;
    if (wraps_small < 10 || wraps_full < 1) begin
      failures++;
      $display("FAIL too few wraps: small %0d full %0d", wraps_small, wraps_full);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_CYC + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
