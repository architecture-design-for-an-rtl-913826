// error_unit: output adder and error subtractor of the LMS equalizer.
//
// During the filtering pass every tap's multiplier delivers x(n-k)*w_k. This
// unit adds the NTAPS products into the filter output
//   y(n) = sum_k x(n-k) * w_k
// and forms the error against the desired (training) sample
//   e(n) = d(n) - y(n).
// The sum is carried at full width and saturated once to W bits; e(n) is
// saturated to W bits as well. Purely combinational: the caller registers
// y and e at the end of the filtering pass. The function follows the
// original LMS architecture; the adder structure and saturation are this
// design's choice.
module error_unit
  import lms_pkg::*;
#(
  parameter int unsigned NTAPS = LMS_NTAPS,
  parameter int unsigned W     = LMS_W
) (
  input  logic signed [W-1:0] prod [NTAPS], // tap products x(n-k)*w_k
  input  logic signed [W-1:0] d,            // desired sample d(n)
  output logic signed [W-1:0] y,            // filter output y(n)
  output logic signed [W-1:0] e             // error e(n) = d(n) - y(n)
);

  localparam int unsigned SW = W + $clog2(NTAPS + 1);
  localparam logic signed [W-1:0] MAXV = {1'b0, {(W-1){1'b1}}};
  localparam logic signed [W-1:0] MINV = {1'b1, {(W-1){1'b0}}};

  logic signed [SW-1:0] acc;
  logic signed [W:0]    diff;

  always_comb begin
    acc = '0;
    for (int k = 0; k < NTAPS; k++)
      acc = acc + SW'(prod[k]);
    if (acc > SW'(MAXV))
      y = MAXV;
    else if (acc < SW'(MINV))
      y = MINV;
    else
      y = acc[W-1:0];

    diff = (W+1)'(d) - (W+1)'(y);
    if (diff[W] != diff[W-1])
      e = diff[W] ? MINV : MAXV;
    else
      e = diff[W-1:0];
  end

endmodule
