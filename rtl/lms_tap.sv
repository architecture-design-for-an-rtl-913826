// lms_tap: one tap of the time-multiplexed LMS adaptive filter.
//
// A tap holds one delayed input sample x(n-k) and its weight w_k. It has a
// single multiplier whose second operand comes from a 2:1 multiplexer:
//   sel = 1  filtering      prod = x(n-k) * w_k         (goes to the output adder)
//   sel = 0  weight update  prod = x(n-k) * mu_e        (the LMS correction term)
// so the same multiplier serves both filtering and adaptation, as in the
// multiplexed-multiplier architecture this design follows. When upd_en is high the
// weight takes w_k + delta at the clock edge, where delta is the multiplier
// output (LMS and sign-error) or +/-mu_e chosen by the sign of x(n-k)
// (sign-data and sign-sign, where the update needs no multiplication).
//
// shift_en loads x_in into the sample register (x_in is the new sample for
// tap 0 and the previous tap's x_out otherwise). An update and a shift in
// the same cycle are allowed: the update uses the old sample.
//
// Arithmetic: W-bit two's complement with FRAC fraction bits. A product is
// shifted right by FRAC (floor) and saturated to W bits; the weight sum
// saturates too. Word widths, rounding and saturation are this design's
// choice; the weights reset to zero.
module lms_tap
  import lms_pkg::*;
#(
  parameter int unsigned W    = LMS_W,
  parameter int unsigned FRAC = LMS_FRAC
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                shift_en,  // load x_in into the sample register
  input  logic                sel,       // multiplexer control: 1 filter, 0 update
  input  logic                upd_en,    // write the updated weight
  input  logic                sign_data, // update with sign(x) instead of x
  input  logic signed [W-1:0] x_in,      // sample entering this tap
  input  logic signed [W-1:0] mu_e,      // mu*e(n) or mu*sign(e(n))
  output logic signed [W-1:0] x_out,     // stored sample x(n-k)
  output logic signed [W-1:0] w,         // tap weight w_k
  output logic signed [W-1:0] prod       // multiplier output
);

  localparam logic signed [W-1:0] MAXV = {1'b0, {(W-1){1'b1}}};
  localparam logic signed [W-1:0] MINV = {1'b1, {(W-1){1'b0}}};

  logic signed [W-1:0]   x_q, w_q;
  logic signed [W-1:0]   mult_b;
  logic signed [2*W-1:0] mult_full;
  logic signed [2*W-1:0] mult_shr;
  logic signed [W-1:0]   delta;
  logic signed [W:0]     w_sum;
  logic signed [W-1:0]   w_next;

  // Operand multiplexer and the shared multiplier.
  always_comb begin
    mult_b    = sel ? w_q : mu_e;
    mult_full = x_q * mult_b;
    mult_shr  = mult_full >>> FRAC;
    if (mult_shr > (2*W)'(MAXV))
      prod = MAXV;
    else if (mult_shr < (2*W)'(MINV))
      prod = MINV;
    else
      prod = mult_shr[W-1:0];
  end

  // Weight update term and saturating weight adder.
  always_comb begin
    if (sign_data)
      delta = x_q[W-1] ? W'(-mu_e) : mu_e;
    else
      delta = prod;
    if (mu_e == MINV && sign_data && x_q[W-1])
      delta = MAXV;  // -MINV does not fit in W bits
    w_sum = (W+1)'(w_q) + (W+1)'(delta);
    if (w_sum[W] != w_sum[W-1])
      w_next = w_sum[W] ? MINV : MAXV;
    else
      w_next = w_sum[W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0;
      w_q <= '0;
    end else begin
      if (shift_en) x_q <= x_in;
      if (upd_en)   w_q <= w_next;
    end
  end

  assign x_out = x_q;
  assign w     = w_q;

endmodule
