// tb_agc: self-checking test of the automatic gain control.
//
// A reference model of the loop (y = x*g, u = setpoint - |y|,
// g = alpha*g + (1-alpha)*u) predicts y and the gain for every sample and
// both are compared bit for bit. A square wave of constant envelope |x| must
// settle the gain at setpoint / (1 + |x|), so a larger input gives a smaller
// gain; with the AGC disabled the input must pass unchanged and the gain hold.
`timescale 1ns/1ps
module tb_agc;
  import cranc_pkg::*;

  localparam int unsigned W   = DATA_W_DEF;
  localparam int unsigned F   = FRAC_W_DEF;
  localparam int unsigned AS  = ALPHA_SHIFT_DEF;
  localparam longint      HI  = (64'sd1 <<< (W - 1)) - 1;
  localparam longint      LO  = -(64'sd1 <<< (W - 1));
  localparam longint      ONE = 64'sd1 <<< F;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b1;
  logic valid = 1'b0;
  logic signed [W-1:0] x = '0, setpoint;
  logic signed [W-1:0] y, gain;

  int checks = 0;
  int failures = 0;
  longint rg;

  always #5 clk = ~clk;

  agc dut (.clk, .rst_n, .en, .valid, .x, .setpoint, .y, .gain);

  function automatic longint satl(input longint v);
    if (v > HI) return HI;
    if (v < LO) return LO;
    return v;
  endfunction

  task automatic step(input longint xv);
    longint ry, m, u;
    ry = en ? satl((xv * rg + (64'sd1 <<< (F - 1))) >>> F) : xv;
    @(negedge clk);
    x = W'(xv);
    valid = 1'b1;
    #1;
    checks++;
    if (longint'(y) != ry) begin
      failures++;
      if (failures < 10) $display("FAIL y=%0d expected %0d", y, ry);
    end
    @(negedge clk);
    valid = 1'b0;
    if (en) begin
      m = (ry < 0) ? -ry : ry;
      u = longint'(setpoint) - m;
      rg = satl((rg >>> AS) + u - (u >>> AS));
    end
    checks++;
    if (longint'(gain) != rg) begin
      failures++;
      if (failures < 10) $display("FAIL gain=%0d expected %0d", gain, rg);
    end
  endtask

  // Square wave of amplitude amp; returns the settled gain.
  task automatic square(input longint amp, input int count, output longint gs);
    for (int k = 0; k < count; k++) step((k % 2 == 0) ? amp : -amp);
    gs = longint'(gain);
  endtask

  initial begin
    longint g_small, g_big, expect_g, held;
    setpoint = W'(ONE);
    rg = ONE;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (longint'(gain) != ONE) begin
      failures++;
      $display("FAIL gain after reset %0d", gain);
    end

    // Small envelope 0.25: gain -> 1/1.25 = 0.8.
    square(ONE / 4, 60, g_small);
    expect_g = (ONE * ONE) / (ONE + ONE / 4);
    checks++;
    if (g_small < expect_g - 64 || g_small > expect_g + 64) begin
      failures++;
      $display("FAIL settled gain %0d, expected about %0d", g_small, expect_g);
    end
    // Large envelope 1.5: gain -> 1/2.5 = 0.4.
    square(3 * ONE / 2, 60, g_big);
    expect_g = (ONE * ONE) / (ONE + 3 * ONE / 2);
    checks++;
    if (g_big < expect_g - 64 || g_big > expect_g + 64 || g_big >= g_small) begin
      failures++;
      $display("FAIL settled gain %0d, expected about %0d", g_big, expect_g);
    end

    // Random input.
    for (int k = 0; k < 300; k++) step(longint'($urandom_range(0, 4 * ONE)) - 2 * ONE);

    // Disabled: pass-through, gain held.
    held = longint'(gain);
    en = 1'b0;
    for (int k = 0; k < 20; k++) step(longint'($urandom_range(0, 4 * ONE)) - 2 * ONE);
    checks++;
    if (longint'(gain) != held) begin
      failures++;
      $display("FAIL gain moved while disabled");
    end
    en = 1'b1;
    setpoint = W'(ONE / 2);
    for (int k = 0; k < 100; k++) step(longint'($urandom_range(0, 2 * ONE)) - ONE);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
