// tb_cranc_stage: self-checking test of one cross-coupled LMS stage.
//
// A reference model written with 64-bit integers runs the same equations
// (e = s - X^T w, w += 2^-MU_SHIFT * e * X, X shifted by the other channel's
// error) and every e1/e2 the stage produces is compared bit for bit. Sources
// are two random signals mixed through one-sample cross-coupling paths, so the
// weights really adapt. The test also checks the latency (2*N/2+5 cycles from
// start to done), that `busy` is high in between, that `clear` zeroes the
// state, and that a large input drives the saturation flag. The stage here
// keeps its vectors in flip-flops; the block-RAM style runs in the top-level
// test.
`timescale 1ns/1ps
module tb_cranc_stage;
  import cranc_pkg::*;

  localparam int unsigned N  = 50;
  localparam int unsigned W  = 24;
  localparam int unsigned F  = 20;
  localparam int unsigned MU = 7;
  localparam int unsigned M  = N / 2;
  localparam longint      HI = (64'sd1 <<< (W - 1)) - 1;
  localparam longint      LO = -(64'sd1 <<< (W - 1));

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clear = 1'b0;
  logic start = 1'b0;
  logic signed [W-1:0] s1 = '0, s2 = '0;
  logic busy, done, sat;
  logic signed [W-1:0] e1, e2;

  int checks = 0;
  int failures = 0;
  int sat_seen = 0;

  always #5 clk = ~clk;

  cranc_stage #(.N(N), .W(W), .F(F), .MU_SHIFT(MU), .USE_BRAM(1'b0)) dut (
    .clk, .rst_n, .clear, .start, .s1, .s2, .busy, .done, .sat, .e1, .e2);

  // Reference model.
  longint rw1 [N], rw2 [N], rx1 [N], rx2 [N];

  function automatic longint satl(input longint v);
    if (v > HI) return HI;
    if (v < LO) return LO;
    return v;
  endfunction

  task automatic ref_clear();
    for (int i = 0; i < N; i++) begin
      rw1[i] = 0; rw2[i] = 0; rx1[i] = 0; rx2[i] = 0;
    end
  endtask

  task automatic ref_step(input longint a1, input longint a2,
                          output longint o1, output longint o2, output bit osat);
    longint d1, d2, y1, y2, t1, t2;
    d1 = 0; d2 = 0;
    for (int i = 0; i < N; i++) begin
      d1 += rw1[i] * rx1[i];
      d2 += rw2[i] * rx2[i];
    end
    t1 = a1 - ((d1 + (64'sd1 <<< (F - 1))) >>> F);
    t2 = a2 - ((d2 + (64'sd1 <<< (F - 1))) >>> F);
    osat = (t1 != satl(t1)) || (t2 != satl(t2));
    y1 = satl(t1);
    y2 = satl(t2);
    for (int i = 0; i < N; i++) begin
      rw1[i] = satl(rw1[i] + ((y1 * rx1[i] + (64'sd1 <<< (F + MU - 1))) >>> (F + MU)));
      rw2[i] = satl(rw2[i] + ((y2 * rx2[i] + (64'sd1 <<< (F + MU - 1))) >>> (F + MU)));
    end
    for (int i = N - 1; i > 0; i--) begin
      rx1[i] = rx1[i-1];
      rx2[i] = rx2[i-1];
    end
    rx1[0] = y2;
    rx2[0] = y1;
    o1 = y1;
    o2 = y2;
  endtask

  // One sample through the DUT; returns the cycles from start to done.
  task automatic run_sample(input longint a1, input longint a2, output int lat);
    int n;
    @(negedge clk);
    s1 = W'(a1);
    s2 = W'(a2);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    n = 1;
    while (!done) begin
      if (!busy) begin
        failures++;
        $display("FAIL busy low before done");
      end
      @(negedge clk);
      n++;
    end
    lat = n - 1;  // clock edges from the one that took start to the one that raised done
  endtask

  task automatic check_sample(input longint a1, input longint a2);
    longint r1, r2;
    bit rs;
    int lat;
    ref_step(a1, a2, r1, r2, rs);
    run_sample(a1, a2, lat);
    checks++;
    if (longint'(e1) != r1 || longint'(e2) != r2) begin
      failures++;
      if (failures < 10) $display("FAIL e mismatch dut=(%0d,%0d) ref=(%0d,%0d)", e1, e2, r1, r2);
    end
    checks++;
    if (lat != 2 * M + 5) begin
      failures++;
      if (failures < 10) $display("FAIL latency %0d, expected %0d", lat, 2 * M + 5);
    end
    checks++;
    if (sat !== rs) begin
      failures++;
      if (failures < 10) $display("FAIL sat flag %0b expected %0b", sat, rs);
    end
    if (sat) sat_seen++;
  endtask

  // Mixed random sources: s1 = t1 + 0.5 t2(k-1), s2 = t2 + 0.4 t1(k-1).
  longint t1p, t2p;
  task automatic mixed_sample();
    longint t1, t2, a1, a2;
    t1 = longint'($signed($urandom_range(0, 2 * 300000))) - 300000;
    t2 = longint'($signed($urandom_range(0, 2 * 300000))) - 300000;
    a1 = t1 + (t2p >>> 1);
    a2 = t2 + ((t1p * 4) / 10);
    t1p = t1;
    t2p = t2;
    check_sample(a1, a2);
  endtask

  initial begin
    ref_clear();
    t1p = 0;
    t2p = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Wait for the clear that follows reset.
    while (busy) @(negedge clk);
    repeat (400) mixed_sample();

    // Clear the weights and delay lines, then continue.
    @(negedge clk);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    while (busy) @(negedge clk);
    ref_clear();
    checks++;
    if (dut.state != ST_IDLE) begin
      failures++;
      $display("FAIL not idle after clear");
    end
    repeat (200) mixed_sample();

    // Full-scale inputs force the errors to saturate.
    repeat (20) check_sample(HI, LO);
    checks++;
    if (sat_seen == 0) begin
      failures++;
      $display("FAIL saturation never flagged");
    end
    repeat (50) mixed_sample();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
