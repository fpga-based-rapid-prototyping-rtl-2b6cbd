// cranc_stage: one crosstalk-resistant adaptive noise canceller (CRANC), also
// called a symmetric adaptive decorrelator: two LMS filters cross-coupled so
// that each one is driven by the other's error.
//
// For every sample pair (s1, s2) the stage computes
//   e1 = s1 - X1^T w1,   X1 = [e2(k-1) ... e2(k-N)]
//   e2 = s2 - X2^T w2,   X2 = [e1(k-1) ... e1(k-N)]
//   w1 += mu * e1 * X1,  w2 += mu * e2 * X2,   mu = 2^-MU_SHIFT
// and then pushes e2 into X1 and e1 into X2. The two errors are the two
// separated signals.
//
// How it works. Every vector (w1, w2, X1, X2) is split into a first and a
// second half of M = N/2 entries, each held in its own vec_mem. The dot
// products run as two half-length multiply-accumulates in parallel whose sums
// are added at the end, and the weight update likewise walks both halves at
// once, so one sample costs about N cycles instead of 2N. Each delay-line
// half is a circular buffer sharing one pointer; on a shift the oldest entry
// of the first half moves into the second half (overwriting the oldest entry
// there, which leaves the line) and the new error takes its place.
//
// Numbers are W-bit two's complement with F fraction bits. Products are kept
// at full precision, sums of products are shifted back by F with rounding to
// nearest (half up) and every stored result saturates to W bits. Rounding
// matters in the weight update: truncating mu*e*x would pull every weight by
// half an LSB per sample, which at 16 bits is as large as the LMS gradient
// near convergence and leaves the crosstalk uncancelled.
//
// Interface and timing. Raise `start` for one cycle with s1/s2 while `busy` is
// low; e1/e2 are updated and `done` pulses 2*M+5 cycles later (the sample is
// accepted in the cycle `start` is seen, `done` follows in cycle 2*M+5 after
// that). `busy` is high from the accepted start until `done`. e1/e2 hold their
// value until the next sample completes. `clear` (seen while idle) zeroes all
// weights, delay lines and e1/e2 in M cycles; the stage also does this after
// reset.
// `sat` pulses with `done` if an error output saturated.
//
// From the design description: the cross-coupled update equations, mu = 2^-7,
// the Q4.20 24-bit format, the split of dot product and update into two
// parallel halves, array (flip-flop) or block RAM storage. This design's own
// choices: the circular-buffer delay line, the registered-read schedule, the
// rounding and saturation, and the start/done handshake.
module cranc_stage
  import cranc_pkg::*;
#(
  parameter int unsigned N        = TAPS_STAGE1_DEF,
  parameter int unsigned W        = DATA_W_DEF,
  parameter int unsigned F        = FRAC_W_DEF,
  parameter int unsigned MU_SHIFT = MU_SHIFT_DEF,
  parameter bit          USE_BRAM = 1'b0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                start,
  input  logic signed [W-1:0] s1,
  input  logic signed [W-1:0] s2,
  output logic                busy,
  output logic                done,
  output logic                sat,
  output logic signed [W-1:0] e1,
  output logic signed [W-1:0] e2
);

  localparam int unsigned M  = N / 2;
  localparam int unsigned AW = (M > 1) ? $clog2(M) : 1;
  localparam int unsigned CW = $clog2(M + 1) + 1;      // counter 0..M
  localparam int unsigned PW = 2 * W;                  // full product
  localparam int unsigned AccW = PW + $clog2(M + 1) + 1;

  // Half an LSB of the result, added before a right shift to round to nearest.
  localparam logic signed [AccW:0] DHALF = (AccW+1)'(1) <<< (F - 1);
  localparam logic signed [AccW:0] UHALF = (AccW+1)'(1) <<< (F + MU_SHIFT - 1);

  // Saturate a wide value to W bits.
  function automatic logic signed [W-1:0] sat_w(input logic signed [AccW:0] v);
    logic signed [AccW:0] hi, lo;
    hi = (AccW+1)'(signed'({1'b0, {(W-1){1'b1}}}));
    lo = -hi - 1;
    if (v > hi)      return {1'b0, {(W-1){1'b1}}};
    else if (v < lo) return {1'b1, {(W-1){1'b0}}};
    else             return v[W-1:0];
  endfunction

  function automatic logic is_sat(input logic signed [AccW:0] v);
    logic signed [AccW:0] hi, lo;
    hi = (AccW+1)'(signed'({1'b0, {(W-1){1'b1}}}));
    lo = -hi - 1;
    return (v > hi) || (v < lo);
  endfunction

  stage_state_t        state;
  logic [CW-1:0]       cnt;
  logic [AW-1:0]       ptr;       // circular-buffer base of both delay-line halves
  logic [AW-1:0]       ptr_dec;
  logic signed [W-1:0] s1_q, s2_q;

  // Memory ports: index 0 = channel 1 (w1 / X1), 1 = channel 2 (w2 / X2);
  // A = first half (lags 0..M-1), B = second half (lags M..N-1).
  logic                we_w, we_x;
  logic [AW-1:0]       wa_w, wa_x, ra_w, ra_x;
  logic signed [W-1:0] wd_wA [2], wd_wB [2], wd_xA [2], wd_xB [2];
  logic signed [W-1:0] rd_wA [2], rd_wB [2], rd_xA [2], rd_xB [2];

  for (genvar c = 0; c < 2; c++) begin : g_ch
    vec_mem #(.DEPTH(M), .W(W), .USE_BRAM(USE_BRAM)) u_wA (
      .clk, .we(we_w), .waddr(wa_w), .wdata(wd_wA[c]), .raddr(ra_w), .rdata(rd_wA[c]));
    vec_mem #(.DEPTH(M), .W(W), .USE_BRAM(USE_BRAM)) u_wB (
      .clk, .we(we_w), .waddr(wa_w), .wdata(wd_wB[c]), .raddr(ra_w), .rdata(rd_wB[c]));
    vec_mem #(.DEPTH(M), .W(W), .USE_BRAM(USE_BRAM)) u_xA (
      .clk, .we(we_x), .waddr(wa_x), .wdata(wd_xA[c]), .raddr(ra_x), .rdata(rd_xA[c]));
    vec_mem #(.DEPTH(M), .W(W), .USE_BRAM(USE_BRAM)) u_xB (
      .clk, .we(we_x), .waddr(wa_x), .wdata(wd_xB[c]), .raddr(ra_x), .rdata(rd_xB[c]));
  end

  // Two half-length accumulators per channel (first part / second part).
  logic signed [AccW-1:0] accA [2], accB [2];
  logic signed [W-1:0]    err [2];
  logic                   sat_pend;

  assign ptr_dec = (ptr == '0) ? AW'(M - 1) : ptr - 1'b1;

  // Address of lag `i` in a delay-line half: (ptr + i) mod M.
  logic [AW:0] lag_sum;
  assign lag_sum = {1'b0, ptr} + (AW+1)'(cnt);

  // Read addresses, writes and their data.
  always_comb begin
    ra_w = AW'(cnt);
    ra_x = (lag_sum >= (AW+1)'(M)) ? AW'(lag_sum - (AW+1)'(M)) : AW'(lag_sum);
    if (state == ST_SH0) ra_x = ptr_dec;

    we_w = 1'b0;
    wa_w = AW'(cnt - 1'b1);
    we_x = 1'b0;
    wa_x = ptr;
    for (int c = 0; c < 2; c++) begin
      wd_wA[c] = '0;
      wd_wB[c] = '0;
      wd_xA[c] = '0;
      wd_xB[c] = '0;
    end

    unique case (state)
      ST_CLR: begin
        we_w = 1'b1;
        we_x = 1'b1;
        wa_w = AW'(cnt);
        wa_x = AW'(cnt);
      end
      ST_UPD: begin
        we_w = (cnt != '0);
        for (int c = 0; c < 2; c++) begin
          wd_wA[c] = sat_w((AccW+1)'(rd_wA[c]) +
                           (((AccW+1)'(err[c]) * (AccW+1)'(rd_xA[c]) + UHALF) >>> (F + MU_SHIFT)));
          wd_wB[c] = sat_w((AccW+1)'(rd_wB[c]) +
                           (((AccW+1)'(err[c]) * (AccW+1)'(rd_xB[c]) + UHALF) >>> (F + MU_SHIFT)));
        end
      end
      ST_SH1: begin
        // X1 receives e2, X2 receives e1; the first half's oldest entry
        // (read in ST_SH0) moves to the second half.
        we_x = 1'b1;
        wd_xA[0] = err[1];
        wd_xA[1] = err[0];
        wd_xB[0] = rd_xA[0];
        wd_xB[1] = rd_xA[1];
      end
      default: ;
    endcase
  end

  // Error of each channel from its two partial sums.
  logic signed [AccW:0] diff [2];
  always_comb begin
    diff[0] = (AccW+1)'(s1_q) - (((AccW+1)'(accA[0]) + (AccW+1)'(accB[0]) + DHALF) >>> F);
    diff[1] = (AccW+1)'(s2_q) - (((AccW+1)'(accA[1]) + (AccW+1)'(accB[1]) + DHALF) >>> F);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_CLR;
      cnt   <= '0;
      ptr   <= '0;
      s1_q  <= '0;
      s2_q  <= '0;
      done  <= 1'b0;
      sat   <= 1'b0;
      e1    <= '0;
      e2    <= '0;
      for (int c = 0; c < 2; c++) begin
        accA[c] <= '0;
        accB[c] <= '0;
        err[c]  <= '0;
      end
    end else begin
      done <= 1'b0;
      sat  <= 1'b0;
      unique case (state)
        ST_CLR: begin
          ptr <= '0;
          e1  <= '0;
          e2  <= '0;
          if (cnt == CW'(M - 1)) begin
            cnt   <= '0;
            state <= ST_IDLE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        ST_IDLE: begin
          cnt <= '0;
          if (clear) begin
            state <= ST_CLR;
          end else if (start) begin
            s1_q  <= s1;
            s2_q  <= s2;
            for (int c = 0; c < 2; c++) begin
              accA[c] <= '0;
              accB[c] <= '0;
            end
            state <= ST_DOT;
          end
        end
        ST_DOT: begin
          // Reads issued for lag cnt; data of lag cnt-1 arrives now.
          if (cnt != '0) begin
            for (int c = 0; c < 2; c++) begin
              accA[c] <= accA[c] + AccW'(rd_wA[c]) * AccW'(rd_xA[c]);
              accB[c] <= accB[c] + AccW'(rd_wB[c]) * AccW'(rd_xB[c]);
            end
          end
          if (cnt == CW'(M)) begin
            cnt   <= '0;
            state <= ST_ERR;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        ST_ERR: begin
          for (int c = 0; c < 2; c++) err[c] <= sat_w(diff[c]);
          state <= ST_UPD;
        end
        ST_UPD: begin
          if (cnt == CW'(M)) begin
            cnt   <= '0;
            state <= ST_SH0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        ST_SH0: begin
          ptr   <= ptr_dec;
          state <= ST_SH1;
        end
        ST_SH1: begin
          e1    <= err[0];
          e2    <= err[1];
          done  <= 1'b1;
          sat   <= sat_pend;
          state <= ST_IDLE;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // Saturation seen in ST_ERR, reported with done.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                sat_pend <= 1'b0;
    else if (state == ST_ERR)  sat_pend <= is_sat(diff[0]) || is_sat(diff[1]);
  end

  assign busy = (state != ST_IDLE);

  // The delay line splits into two equal halves.
  initial assert (N % 2 == 0 && N >= 2) else $error("cranc_stage: N must be even and >= 2");

  // A start while busy is a protocol error of the caller.
  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);

endmodule
