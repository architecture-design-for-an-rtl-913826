// mu_unit: the common step-size multiplier of the LMS equalizer.
//
// All taps share one multiplier that scales the error by the step size mu.
// For plain LMS and sign-data LMS it forms mu*e(n); for sign-error and
// sign-sign LMS it needs no multiplication and gives +mu or -mu according to
// the sign of e(n) (sign(e) = -1 for e < 0, +1 otherwise). The result, mu_e,
// is the second multiplier operand of every tap during the weight-update
// pass.
//
// Purely combinational. Fixed point: W bits, FRAC fraction bits; the product
// is shifted right by FRAC (floor) and saturated to W bits. mu is expected
// to be positive. The shared multiplier follows the original architecture; the number
// format and the saturation are this design's choice.
module mu_unit
  import lms_pkg::*;
#(
  parameter int unsigned W    = LMS_W,
  parameter int unsigned FRAC = LMS_FRAC
) (
  input  logic signed [W-1:0] mu,         // step size
  input  logic signed [W-1:0] e,          // error e(n)
  input  logic                sign_error, // use sign(e) instead of e
  output logic signed [W-1:0] mu_e        // mu*e or mu*sign(e)
);

  localparam logic signed [W-1:0] MAXV = {1'b0, {(W-1){1'b1}}};
  localparam logic signed [W-1:0] MINV = {1'b1, {(W-1){1'b0}}};

  logic signed [2*W-1:0] full;
  logic signed [2*W-1:0] shr;

  always_comb begin
    full = mu * e;
    shr  = full >>> FRAC;
    if (sign_error) begin
      if (!e[W-1])
        mu_e = mu;
      else if (mu == MINV)
        mu_e = MAXV;
      else
        mu_e = -mu;
    end else if (shr > (2*W)'(MAXV)) begin
      mu_e = MAXV;
    end else if (shr < (2*W)'(MINV)) begin
      mu_e = MINV;
    end else begin
      mu_e = shr[W-1:0];
    end
  end

endmodule
