// lms_equalizer: NTAPS-tap LMS adaptive equalizer with multiplexed multipliers.
//
// An adaptive FIR equalizer trained by the least-mean-squares rule. For every
// input sample x(n) with its desired (training) sample d(n) it computes
//   y(n) = sum_k w_k * x(n-k),   e(n) = d(n) - y(n)
// and then moves every weight along the error gradient:
//   w_k += mu * e(n) * x(n-k)            (mode LMS)
// or one of the cheaper sign variants (sign-data, sign-error, sign-sign, see
// lms_pkg). To save multipliers each tap has a single multiplier that is used
// twice per sample, its second operand switched by a multiplexer: first with
// the weight (filtering), then with mu*e(n) (weight update). One common
// multiplier (mu_unit) scales the error by mu. The taps, the multiplexing,
// the common mu multiplier, the four update rules and the default of two
// taps follow the original architecture; its 18-bit word length is used for
// fixed point, and the fraction width, the handshake, saturation and reset
// values are this design's choice.
//
// Interface: offer x_in, d_in, mu and mode with in_valid; the sample is taken
// when in_ready is also high. y_out and e_out for that sample appear with a
// one-cycle out_valid pulse two cycles later, in the same cycle as its weight
// update is written; w_out shows the weights (updated one cycle after
// out_valid). A continuous stream is taken at one sample every two cycles.
// Reset (rst_n low, asynchronous) clears the delay line and the weights.
module lms_equalizer
  import lms_pkg::*;
#(
  parameter int unsigned NTAPS = LMS_NTAPS, // number of taps
  parameter int unsigned W     = LMS_W,     // word length
  parameter int unsigned FRAC  = LMS_FRAC   // fraction bits
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic signed [W-1:0] x_in,          // received sample x(n)
  input  logic signed [W-1:0] d_in,          // desired sample d(n)
  input  logic signed [W-1:0] mu,            // step size, positive
  input  lms_mode_e           mode,          // update rule for this sample
  output logic                out_valid,
  output logic signed [W-1:0] y_out,         // equalizer output y(n)
  output logic signed [W-1:0] e_out,         // error e(n)
  output logic signed [W-1:0] w_out [NTAPS]  // tap weights
);

  logic shift_en, sel, cap_en, upd_en;

  logic signed [W-1:0] d_q, mu_q;
  lms_mode_e           mode_q;
  logic signed [W-1:0] y_c, e_c, mu_e_c;
  logic signed [W-1:0] y_q, e_q, mu_e_q;
  logic signed [W-1:0] tap_x   [NTAPS];
  logic signed [W-1:0] tap_prod[NTAPS];

  lms_ctrl u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_ready (in_ready),
    .shift_en (shift_en),
    .sel      (sel),
    .cap_en   (cap_en),
    .upd_en   (upd_en),
    .out_valid(out_valid)
  );

  // Side information travels with its sample.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_q    <= '0;
      mu_q   <= '0;
      mode_q <= MODE_LMS;
    end else if (shift_en) begin
      d_q    <= d_in;
      mu_q   <= mu;
      mode_q <= mode;
    end
  end

  for (genvar k = 0; k < NTAPS; k++) begin : g_tap
    lms_tap #(.W(W), .FRAC(FRAC)) u_tap (
      .clk      (clk),
      .rst_n    (rst_n),
      .shift_en (shift_en),
      .sel      (sel),
      .upd_en   (upd_en),
      .sign_data(mode_q[MODE_BIT_SIGN_DATA]),
      .x_in     (k == 0 ? x_in : tap_x[(k == 0) ? 0 : k-1]),
      .mu_e     (mu_e_q),
      .x_out    (tap_x[k]),
      .w        (w_out[k]),
      .prod     (tap_prod[k])
    );
  end

  error_unit #(.NTAPS(NTAPS), .W(W)) u_err (
    .prod(tap_prod),
    .d   (d_q),
    .y   (y_c),
    .e   (e_c)
  );

  mu_unit #(.W(W), .FRAC(FRAC)) u_mu (
    .mu        (mu_q),
    .e         (e_c),
    .sign_error(mode_q[MODE_BIT_SIGN_ERROR]),
    .mu_e      (mu_e_c)
  );

  // End of the filtering pass: hold y(n), e(n) and the scaled error.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_q    <= '0;
      e_q    <= '0;
      mu_e_q <= '0;
    end else if (cap_en) begin
      y_q    <= y_c;
      e_q    <= e_c;
      mu_e_q <= mu_e_c;
    end
  end

  assign y_out = y_q;
  assign e_out = e_q;

endmodule
