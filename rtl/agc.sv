// agc: automatic gain control for one A/D input channel.
//
// A feedback loop made of a multiplier (the variable-gain amplifier), an
// absolute-value envelope detector, a set point and a first-order leaky
// integrator:
//   y(k)   = x(k) * g(k-1)
//   u(k)   = setpoint - |y(k)|
//   g(k)   = alpha * g(k-1) + (1 - alpha) * u(k),   alpha = 2^-ALPHA_SHIFT
// As the input envelope grows the filter output, and with it the gain,
// shrinks, which pulls the output envelope back. The leak keeps the gain
// finite when the input is silent, at the price of a steady-state error: for
// a constant envelope |x| the gain settles at setpoint / (1 + |x|).
//
// Numbers are W-bit two's complement with F fraction bits; products are
// shifted back by F (rounding to nearest, half up) and saturated. With
// `en` low the input passes unchanged and the gain holds its value.
//
// Interface and timing: y is combinational from x and the gain register;
// the gain register updates on every cycle with `valid` high and `en` high.
// Reset sets the gain to 1.0.
//
// From the design description: the loop structure, the absolute-value
// detector, the filter (1-alpha)/(1-alpha z^-1) with alpha = 2^-1 and a unity
// set point. This design's own choices: the one-sample delay of the gain in
// the loop, reset to unity gain, the enable and the saturation.
module agc
  import cranc_pkg::*;
#(
  parameter int unsigned W           = DATA_W_DEF,
  parameter int unsigned F           = FRAC_W_DEF,
  parameter int unsigned ALPHA_SHIFT = ALPHA_SHIFT_DEF
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                valid,
  input  logic signed [W-1:0] x,
  input  logic signed [W-1:0] setpoint,
  output logic signed [W-1:0] y,
  output logic signed [W-1:0] gain
);

  localparam int unsigned XW = 2 * W + 2;
  localparam logic signed [XW-1:0] HI = XW'((64'sd1 <<< (W - 1)) - 1);
  localparam logic signed [XW-1:0] LO = -HI - 1;
  localparam logic signed [XW-1:0] HALF = XW'(1) <<< (F - 1);

  function automatic logic signed [W-1:0] sat_w(input logic signed [XW-1:0] v);
    if (v > HI)      return HI[W-1:0];
    else if (v < LO) return LO[W-1:0];
    else             return v[W-1:0];
  endfunction

  logic signed [XW-1:0] prod, mag, u, g_next;
  logic signed [W-1:0]  y_amp;

  always_comb begin
    prod   = (XW'(x) * XW'(gain) + HALF) >>> F;
    y_amp  = sat_w(prod);
    mag    = (y_amp < 0) ? -XW'(y_amp) : XW'(y_amp);
    u      = XW'(setpoint) - mag;
    // alpha * g + (1 - alpha) * u with alpha = 2^-ALPHA_SHIFT
    g_next = (XW'(gain) >>> ALPHA_SHIFT) + u - (u >>> ALPHA_SHIFT);
    y      = en ? y_amp : x;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           gain <= W'(64'sd1 <<< F);
    else if (valid && en) gain <= sat_w(g_next);
  end

endmodule
