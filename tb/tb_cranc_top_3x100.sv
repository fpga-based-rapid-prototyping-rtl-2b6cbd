// tb_cranc_top_3x100: end-to-end test of the decorrelator in its larger
// build: three cascaded stages of 100 weights each (300 in total), all in
// flip-flops, with 16-bit Q3.13 data and mu = 2^-7. Apart from the size and
// the number format it runs the same test as tb_cranc_top, but asks for 6 dB
// of crosstalk reduction instead of 10: with 300 weights and 13 fraction
// bits the weight noise near convergence leaves more crosstalk behind.
//
// Two independent random sources are mixed through causal cross paths,
//   s1(k) = t1(k) + 0.6 t2(k-1) + 0.25 t2(k-3)
//   s2(k) = t2(k) + 0.5 t1(k-1)
// and fed to the A/D inputs. A reference model of the whole path (scaling,
// AGC, both stages and the register hand-over between them) predicts every
// DAC word, which is compared bit for bit. After adaptation the test also
// measures how much of the other source is left in each output and requires
// at least MIN_DB of crosstalk reduction.
//
// Every mechanism of the design is made to happen and counted: straight-
// through mode, the weight reset, an overrun (a sample offered while busy),
// the AGC, error saturation and the pipelined hand-over between stages. The
// latency from sample to DAC word is checked in both modes.
`timescale 1ns/1ps
module tb_cranc_top_3x100;
  import cranc_pkg::*;

  localparam int unsigned NS   = 3;
  localparam int unsigned TAPS [NS] = '{100, 100, 100};
  localparam int unsigned NMAX = 100;
  localparam bit          BRAM [NS] = '{1'b0, 1'b0, 1'b0};
  localparam int unsigned W    = 16;
  localparam int unsigned F    = 13;
  localparam int unsigned MU   = MU_SHIFT_DEF;
  localparam int unsigned AS   = ALPHA_SHIFT_DEF;
  localparam longint      HI   = (64'sd1 <<< (W - 1)) - 1;
  localparam longint      LO   = -(64'sd1 <<< (W - 1));
  localparam longint      ONE  = 64'sd1 <<< F;
  localparam longint      AMP  = (3 * ONE) / 10;  // source amplitude 0.3
  localparam real         MIN_DB = 6.0;        // required crosstalk reduction
  localparam int unsigned LAT_RUN    = 2 * (NMAX / 2) + 7;
  localparam int unsigned LAT_BYPASS = 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic sample_valid = 1'b0;
  logic signed [W-1:0] adc1 = '0, adc2 = '0;
  logic ready, overrun, dac_valid, sat;
  logic signed [W-1:0] adc_scale, dac_scale, agc_setpoint;
  logic straight_through = 1'b0, reset_weights = 1'b0, agc_en = 1'b0;
  logic signed [W-1:0] dac1, dac2, agc_gain1, agc_gain2;

  always #5 clk = ~clk;

  cranc_top #(
    .NSTAGES(NS), .TAPS(TAPS), .USE_BRAM(BRAM), .W(W), .F(F)
  ) dut (
    .clk, .rst_n, .sample_valid, .adc1, .adc2, .ready, .overrun,
    .adc_scale, .dac_scale, .straight_through, .reset_weights, .agc_en,
    .agc_setpoint, .dac_valid, .dac1, .dac2, .sat, .agc_gain1, .agc_gain2);

  int checks = 0;
  int failures = 0;
  int n_bypass = 0, n_reset = 0, n_overrun = 0, n_agc = 0, n_sat = 0, n_handover = 0;

  // ---------------- reference model ----------------
  longint rw [NS][2][NMAX];
  longint rx [NS][2][NMAX];
  longint pe [NS][2];
  longint g  [2];

  function automatic longint satl(input longint v);
    if (v > HI) return HI;
    if (v < LO) return LO;
    return v;
  endfunction

  function automatic longint fmul(input longint a, input longint b);
    return satl((a * b + (64'sd1 <<< (F - 1))) >>> F);
  endfunction

  task automatic ref_clear();
    for (int s = 0; s < NS; s++)
      for (int c = 0; c < 2; c++) begin
        pe[s][c] = 0;
        for (int i = 0; i < NMAX; i++) begin
          rw[s][c][i] = 0;
          rx[s][c][i] = 0;
        end
      end
  endtask

  // One stage of the reference: returns both errors and whether one saturated.
  task automatic ref_stage(input int s, input longint a1, input longint a2,
                           output longint o1, output longint o2, output bit os);
    longint d [2], t [2], e [2], a [2];
    int n;
    n = TAPS[s];
    a[0] = a1;
    a[1] = a2;
    os = 1'b0;
    for (int c = 0; c < 2; c++) begin
      d[c] = 0;
      for (int i = 0; i < n; i++) d[c] += rw[s][c][i] * rx[s][c][i];
      t[c] = a[c] - ((d[c] + (64'sd1 <<< (F - 1))) >>> F);
      e[c] = satl(t[c]);
      if (e[c] != t[c]) os = 1'b1;
    end
    for (int c = 0; c < 2; c++)
      for (int i = 0; i < n; i++)
        rw[s][c][i] = satl(rw[s][c][i] + ((e[c] * rx[s][c][i] + (64'sd1 <<< (F + MU - 1))) >>> (F + MU)));
    for (int c = 0; c < 2; c++) begin
      for (int i = n - 1; i > 0; i--) rx[s][c][i] = rx[s][c][i-1];
      rx[s][c][0] = e[1 - c];
    end
    o1 = e[0];
    o2 = e[1];
  endtask

  // Whole path for one accepted sample.
  task automatic ref_sample(input longint a1, input longint a2, input bit bypass,
                            input bit agc_on, input longint sp, input longint as,
                            input longint ds,
                            output longint o1, output longint o2, output bit osat);
    longint x [2], y [2], m, u, ne [NS][2];
    bit ss;
    x[0] = fmul(a1, as);
    x[1] = fmul(a2, as);
    for (int c = 0; c < 2; c++) begin
      if (agc_on) begin
        y[c] = fmul(x[c], g[c]);
        m = (y[c] < 0) ? -y[c] : y[c];
        u = sp - m;
        g[c] = satl((g[c] >>> AS) + u - (u >>> AS));
      end else begin
        y[c] = x[c];
      end
    end
    osat = 1'b0;
    if (bypass) begin
      o1 = fmul(y[0], ds);
      o2 = fmul(y[1], ds);
    end else begin
      for (int s = 0; s < NS; s++) begin
        if (s == 0) ref_stage(s, y[0], y[1], ne[s][0], ne[s][1], ss);
        else        ref_stage(s, pe[s-1][0], pe[s-1][1], ne[s][0], ne[s][1], ss);
        osat |= ss;
      end
      for (int s = 0; s < NS; s++) begin
        pe[s][0] = ne[s][0];
        pe[s][1] = ne[s][1];
      end
      o1 = fmul(pe[NS-1][0], ds);
      o2 = fmul(pe[NS-1][1], ds);
    end
  endtask

  // ---------------- driving ----------------
  task automatic drive(input longint a1, input longint a2, output longint d1,
                       output longint d2, output int lat, output bit dsat);
    int n;
    @(negedge clk);
    while (!ready) @(negedge clk);
    adc1 = W'(a1);
    adc2 = W'(a2);
    sample_valid = 1'b1;
    @(negedge clk);
    sample_valid = 1'b0;
    n = 1;
    while (!dac_valid) begin
      @(negedge clk);
      n++;
    end
    lat = n - 1;  // clock edges from the one that took the sample to the one that raised dac_valid
    d1 = dac1;
    d2 = dac2;
    dsat = sat;
  endtask

  task automatic one(input longint a1, input longint a2, output longint d1, output longint d2);
    longint r1, r2;
    bit rs, ds;
    int lat;
    bit byp;
    byp = straight_through || reset_weights;
    ref_sample(a1, a2, byp, agc_en, longint'(agc_setpoint), longint'(adc_scale),
               longint'(dac_scale), r1, r2, rs);
    drive(a1, a2, d1, d2, lat, ds);
    checks++;
    if (d1 != r1 || d2 != r2) begin
      failures++;
      if (failures < 10) $display("FAIL dac (%0d,%0d) expected (%0d,%0d)", d1, d2, r1, r2);
    end
    checks++;
    if (lat != (byp ? LAT_BYPASS : LAT_RUN)) begin
      failures++;
      if (failures < 10) $display("FAIL latency %0d bypass=%0b", lat, byp);
    end
    checks++;
    if (ds != rs) begin
      failures++;
      if (failures < 10) $display("FAIL sat flag %0b expected %0b", ds, rs);
    end
    if (byp && straight_through) n_bypass++;
    if (agc_en) n_agc++;
    if (ds) n_sat++;
    if (!byp) n_handover++;
  endtask

  // Source generator with the cross paths of the header.
  longint th1 [4], th2 [4];
  longint t1_hist [4];
  real pin, pout;

  task automatic mixed(input int count, input bit measure);
    longint t1, t2, a1, a2, d1, d2, ref1;
    for (int k = 0; k < count; k++) begin
      t1 = longint'($urandom_range(0, 2 * AMP)) - AMP;
      t2 = longint'($urandom_range(0, 2 * AMP)) - AMP;
      for (int i = 3; i > 0; i--) begin
        th1[i] = th1[i-1];
        th2[i] = th2[i-1];
      end
      th1[0] = t1;
      th2[0] = t2;
      a1 = t1 + (th2[1] * 6) / 10 + th2[3] / 4;
      a2 = t2 + th1[1] / 2;
      one(a1, a2, d1, d2);
      // The cascade delays its output by NS-1 samples.
      ref1 = th1[NS-1];
      if (measure) begin
        pin  += real'(a1 - t1) * real'(a1 - t1);
        pout += real'(d1 - ref1) * real'(d1 - ref1);
      end
    end
  endtask

  initial begin
    longint d1, d2;
    real impr;
    adc_scale    = W'(ONE);
    dac_scale    = W'(ONE);
    agc_setpoint = W'(ONE);
    ref_clear();
    g[0] = ONE;
    g[1] = ONE;
    for (int i = 0; i < 4; i++) begin
      th1[i] = 0;
      th2[i] = 0;
    end
    pin = 0.0;
    pout = 0.0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Straight through, with non-unity scale factors.
    straight_through = 1'b1;
    adc_scale = W'(ONE / 2);
    dac_scale = W'(3 * ONE / 2);
    mixed(20, 1'b0);
    straight_through = 1'b0;
    adc_scale = W'(ONE);
    dac_scale = W'(ONE);

    // Adaptation, then measurement of the crosstalk left.
    mixed(25000, 1'b0);
    mixed(3000, 1'b1);
    impr = 10.0 * $log10(pin / pout);
    $display("crosstalk reduction on channel 1: %0.1f dB", impr);
    checks++;
    if (impr < MIN_DB) begin
      failures++;
      $display("FAIL crosstalk reduction %0.1f dB below %0.1f dB", impr, MIN_DB);
    end

    // Overrun: a second sample while the first is being processed.
    @(negedge clk);
    while (!ready) @(negedge clk);
    begin
      longint r1, r2;
      bit rs;
      ref_sample(AMP, -AMP, 1'b0, 1'b0, ONE, ONE, ONE, r1, r2, rs);
      adc1 = W'(AMP);
      adc2 = W'(-AMP);
      sample_valid = 1'b1;
      @(negedge clk);
      adc1 = 7;
      adc2 = 7;
      repeat (5) @(negedge clk);
      sample_valid = 1'b0;
      checks++;
      if (!overrun) begin
        failures++;
        $display("FAIL overrun not flagged");
      end else n_overrun++;
      while (!dac_valid) @(negedge clk);
      checks++;
      if (longint'(dac1) != r1 || longint'(dac2) != r2) begin
        failures++;
        $display("FAIL dropped sample disturbed the result");
      end
    end

    // Weight reset: samples pass straight through while it is held, and the
    // decorrelator starts again from zero weights.
    @(negedge clk);
    reset_weights = 1'b1;
    ref_clear();
    mixed(5, 1'b0);
    n_reset++;
    reset_weights = 1'b0;
    mixed(200, 1'b0);

    // AGC on both inputs.
    agc_en = 1'b1;
    agc_setpoint = W'(ONE / 2);
    mixed(300, 1'b0);
    agc_en = 1'b0;

    // Saturation: large inputs amplified by the A/D scale factor.
    adc_scale = W'(3 * ONE);
    for (int k = 0; k < 10; k++) one(HI, LO, d1, d2);
    adc_scale = W'(ONE);
    mixed(50, 1'b0);

    $display("mechanisms: bypass=%0d reset=%0d overrun=%0d agc=%0d sat=%0d handover=%0d",
             n_bypass, n_reset, n_overrun, n_agc, n_sat, n_handover);
    checks++;
    if (n_bypass == 0 || n_reset == 0 || n_overrun == 0 || n_agc == 0 || n_sat == 0 ||
        n_handover == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
