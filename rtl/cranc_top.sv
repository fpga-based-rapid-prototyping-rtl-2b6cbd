// cranc_top: two-channel adaptive decorrelator built as a pipelined cascade
// of cross-coupled LMS stages.
//
// Two microphones pick up two sources, each through the other's acoustic
// cross path. The decorrelator removes the cross paths: its two outputs are
// estimates of the two sources, each free of the other. A long decorrelator
// is split into NSTAGES shorter ones in cascade; because each stage has two
// outputs they feed the two inputs of the next stage directly. Every stage
// keeps its result in output registers and, when a new sample arrives, all
// stages start together: stage 0 on the new A/D sample, stage i on the result
// stage i-1 left from the previous sample. The cascade thus runs its stages in
// parallel, at the cost of one sample of delay per extra stage. The feedback
// loop inside a stage is never pipelined. Each stage models cross-path lags
// up to its own length only, so a single cross path longer than the longest
// stage is not cancelled: size the longest stage for the longest path.
//
// Signal path for each accepted sample:
//   A/D word * adc_scale -> AGC (when agc_en) -> stage 0 -> ... -> stage NSTAGES-1
//   -> * dac_scale -> DAC word
// With `straight_through` high the stages are skipped and the scaled input
// goes to the DAC, which is how the decorrelator is switched off for
// comparison. `reset_weights` clears every stage's weights and delay lines;
// while it is high the samples also go straight through (a cleared
// decorrelator passes its input unchanged).
//
// Interface and timing. Present a sample with `sample_valid` for one cycle
// while `ready` is high. `dac_valid` pulses with dac1/dac2 one cycle later in
// straight-through mode, and 2*max(TAPS)/2+7 cycles later otherwise. A sample
// offered while `ready` is low is dropped and `overrun` pulses. At a 40 MHz
// clock the default cascade (50 + 42 weights) needs 57 cycles per sample, far
// below the 1200 cycles of a 33.3 kHz sample period. `sat` pulses with
// dac_valid if any stage saturated an error value. agc_gain1/2 show the
// current AGC gains.
//
// From the design description: the cascade with register hand-over between
// stages, 50 weights in a flip-flop stage followed by 42 in a block-RAM
// stage, the Q4.20 24-bit format, mu = 2^-7, the A/D and DAC scale factors,
// the straight-through and weight-reset controls and the optional AGCs. This
// design's own choices: the handshake, the order of scaling and AGC, the
// behaviour during reset and the overrun flag.
module cranc_top
  import cranc_pkg::*;
#(
  parameter int unsigned NSTAGES              = 2,
  parameter int unsigned TAPS     [NSTAGES]   = '{TAPS_STAGE1_DEF, TAPS_STAGE2_DEF},
  parameter bit          USE_BRAM [NSTAGES]   = '{1'b0, 1'b1},
  parameter int unsigned W                    = DATA_W_DEF,
  parameter int unsigned F                    = FRAC_W_DEF,
  parameter int unsigned MU_SHIFT             = MU_SHIFT_DEF,
  parameter int unsigned ALPHA_SHIFT          = ALPHA_SHIFT_DEF
) (
  input  logic                clk,
  input  logic                rst_n,
  // A/D side
  input  logic                sample_valid,
  input  logic signed [W-1:0] adc1,
  input  logic signed [W-1:0] adc2,
  output logic                ready,
  output logic                overrun,
  // controls
  input  logic signed [W-1:0] adc_scale,
  input  logic signed [W-1:0] dac_scale,
  input  logic                straight_through,
  input  logic                reset_weights,
  input  logic                agc_en,
  input  logic signed [W-1:0] agc_setpoint,
  // D/A side
  output logic                dac_valid,
  output logic signed [W-1:0] dac1,
  output logic signed [W-1:0] dac2,
  output logic                sat,
  output logic signed [W-1:0] agc_gain1,
  output logic signed [W-1:0] agc_gain2
);

  localparam int unsigned XW = 2 * W + 2;
  localparam logic signed [XW-1:0] HI = XW'((64'sd1 <<< (W - 1)) - 1);
  localparam logic signed [XW-1:0] LO = -HI - 1;
  localparam logic signed [XW-1:0] HALF = XW'(1) <<< (F - 1);

  // Fixed-point product a * b, rounded to nearest, shifted back by F and
  // saturated.
  function automatic logic signed [W-1:0] fmul(input logic signed [W-1:0] a,
                                               input logic signed [W-1:0] b);
    logic signed [XW-1:0] p;
    p = (XW'(a) * XW'(b) + HALF) >>> F;
    if (p > HI)      return HI[W-1:0];
    else if (p < LO) return LO[W-1:0];
    else             return p[W-1:0];
  endfunction

  typedef enum logic [1:0] {T_IDLE, T_START, T_WAIT} top_state_t;
  top_state_t state;

  logic                accept;
  logic                bypass_q;
  logic signed [W-1:0] in1_q, in2_q;
  logic signed [W-1:0] sc1, sc2, ag1, ag2;

  logic                st_start;
  logic [NSTAGES-1:0]  st_busy, st_done, st_sat, done_seen, sat_seen;
  logic signed [W-1:0] st_s1 [NSTAGES], st_s2 [NSTAGES];
  logic signed [W-1:0] st_e1 [NSTAGES], st_e2 [NSTAGES];

  assign ready   = (state == T_IDLE) && (st_busy == '0);
  assign accept  = sample_valid && ready;

  // A/D scaling, then the optional AGC on each input.
  assign sc1 = fmul(adc1, adc_scale);
  assign sc2 = fmul(adc2, adc_scale);

  agc #(.W(W), .F(F), .ALPHA_SHIFT(ALPHA_SHIFT)) u_agc1 (
    .clk, .rst_n, .en(agc_en), .valid(accept), .x(sc1), .setpoint(agc_setpoint),
    .y(ag1), .gain(agc_gain1));
  agc #(.W(W), .F(F), .ALPHA_SHIFT(ALPHA_SHIFT)) u_agc2 (
    .clk, .rst_n, .en(agc_en), .valid(accept), .x(sc2), .setpoint(agc_setpoint),
    .y(ag2), .gain(agc_gain2));

  // The cascade: stage i takes the registered outputs of stage i-1.
  for (genvar i = 0; i < NSTAGES; i++) begin : g_stage
    if (i == 0) begin : g_first
      assign st_s1[i] = in1_q;
      assign st_s2[i] = in2_q;
    end else begin : g_next
      assign st_s1[i] = st_e1[i-1];
      assign st_s2[i] = st_e2[i-1];
    end
    cranc_stage #(
      .N(TAPS[i]), .W(W), .F(F), .MU_SHIFT(MU_SHIFT), .USE_BRAM(USE_BRAM[i])
    ) u_stage (
      .clk, .rst_n,
      .clear (reset_weights),
      .start (st_start),
      .s1    (st_s1[i]),
      .s2    (st_s2[i]),
      .busy  (st_busy[i]),
      .done  (st_done[i]),
      .sat   (st_sat[i]),
      .e1    (st_e1[i]),
      .e2    (st_e2[i]));
  end

  assign st_start = (state == T_START) && !bypass_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= T_IDLE;
      bypass_q  <= 1'b0;
      in1_q     <= '0;
      in2_q     <= '0;
      done_seen <= '0;
      sat_seen  <= '0;
      dac_valid <= 1'b0;
      dac1      <= '0;
      dac2      <= '0;
      sat       <= 1'b0;
      overrun   <= 1'b0;
    end else begin
      dac_valid <= 1'b0;
      sat       <= 1'b0;
      overrun   <= sample_valid && !ready;
      unique case (state)
        T_IDLE: begin
          if (accept) begin
            in1_q    <= ag1;
            in2_q    <= ag2;
            bypass_q <= straight_through || reset_weights;
            state    <= T_START;
          end
        end
        T_START: begin
          done_seen <= '0;
          sat_seen  <= '0;
          if (bypass_q) begin
            dac1      <= fmul(in1_q, dac_scale);
            dac2      <= fmul(in2_q, dac_scale);
            dac_valid <= 1'b1;
            state     <= T_IDLE;
          end else begin
            state <= T_WAIT;
          end
        end
        T_WAIT: begin
          if ((done_seen | st_done) == '1) begin
            dac1      <= fmul(st_e1[NSTAGES-1], dac_scale);
            dac2      <= fmul(st_e2[NSTAGES-1], dac_scale);
            dac_valid <= 1'b1;
            sat       <= |(sat_seen | st_sat);
            state     <= T_IDLE;
          end else begin
            done_seen <= done_seen | st_done;
            sat_seen  <= sat_seen | st_sat;
          end
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  // Ready is only raised when every stage is idle, so a start never meets a
  // busy stage.
  assert property (@(posedge clk) disable iff (!rst_n) st_start |-> st_busy == '0);

endmodule
