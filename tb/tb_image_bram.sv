// tb_image_bram: self-checking testbench for the image memory.
//
// At the default depth (one 160 x 106 image) it fills the whole memory
// with random words, reads every address back, then mixes random reads
// and writes. A model array in the testbench predicts each read; dout must
// carry it exactly one clock after the address. Also checked: write-first
// (a write shows its own data on dout the next clock) and that addresses
// beyond the depth neither store data nor alias onto real words.
`timescale 1ns/1ps
module tb_image_bram;

  localparam int DEPTH = ip_pkg::IMG_PIXELS;
  localparam int AW    = $clog2(DEPTH);
  localparam int N_MIX = 40000;

  logic          clk = 1'b0;
  logic          we;
  logic [AW-1:0] addr;
  logic [23:0]   din;
  logic [23:0]   dout;

  logic [23:0] model [DEPTH];
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  image_bram dut (.clk(clk), .we(we), .addr(addr), .din(din), .dout(dout));

  // One memory cycle: drive, clock, then compare dout with the prediction.
  task automatic cycle(logic w, logic [AW-1:0] a, logic [23:0] d);
    logic [23:0] exp_q;
    if (w)                exp_q = d;
    else if (a < DEPTH)   exp_q = model[a];
    else                  exp_q = '0;
    if (w && a < DEPTH) model[a] = d;
    we <= w; addr <= a; din <= d;
    @(posedge clk);
    #1;
    checks++;
    if (dout !== exp_q) begin
      failures++;
      if (failures < 10)
        $display("FAIL we=%0b addr=%0d: dout=%h expected %h", w, a, dout, exp_q);
    end
  endtask

  initial begin
    we = 1'b0; addr = '0; din = '0;
    @(posedge clk); #1;
    for (int a = 0; a < DEPTH; a++) cycle(1'b1, AW'(a), 24'($urandom));
    for (int a = 0; a < DEPTH; a++) cycle(1'b0, AW'(a), 24'($urandom));
    // Writes beyond the depth must not land anywhere.
    for (int a = DEPTH; a < DEPTH + 64; a++) cycle(1'b1, AW'(a), 24'($urandom));
    for (int a = 0; a < 64; a++) cycle(1'b0, AW'(a), '0);
    for (int a = DEPTH - 64; a < DEPTH + 64; a++) cycle(1'b0, AW'(a), '0);
    for (int n = 0; n < N_MIX; n++) begin
      cycle(($urandom % 3) == 0, AW'($urandom % DEPTH), 24'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * DEPTH + N_MIX + 2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
