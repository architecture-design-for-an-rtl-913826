// tb_error_unit: self-checking test of the output adder and error subtractor.
//
// Applies random tap products and desired samples, small and near full scale,
// to an error_unit with the default two taps and one with eleven taps, and
// compares y = sat(sum of products) and e = sat(d - y) with an independent
// computation in 64-bit integers. It also counts that both the output and the
// error saturated at least once.
module tb_error_unit;
  import lms_ref_pkg::*;

  localparam int unsigned W  = 18;
  localparam int unsigned N2 = 2;
  localparam int unsigned N11 = 11;

  logic signed [W-1:0] p2 [N2];
  logic signed [W-1:0] p11[N11];
  logic signed [W-1:0] d, y2, e2, y11, e11;

  int checks = 0, failures = 0;
  int n_ysat = 0, n_esat = 0;

  error_unit #(.NTAPS(N2),  .W(W)) dut2  (.prod(p2),  .d(d), .y(y2),  .e(e2));
  error_unit #(.NTAPS(N11), .W(W)) dut11 (.prod(p11), .d(d), .y(y11), .e(e11));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic logic signed [W-1:0] rnd(input int big);
    logic signed [W-1:0] v;
    v = W'($urandom);
    if (!big) v = v >>> 3;
    return v;
  endfunction

  initial begin
    longint acc, ey, ee;
    for (int i = 0; i < 4000; i++) begin
      int big = ($urandom_range(0, 1) == 0);
      foreach (p2[k])  p2[k]  = rnd(big);
      foreach (p11[k]) p11[k] = rnd(big);
      d = rnd($urandom_range(0, 1));
      #1;
      acc = 0;
      foreach (p2[k]) acc += longint'(p2[k]);
      ey = sat(acc, W);
      ee = sat(longint'(d) - ey, W);
      if (ey != acc) n_ysat++;
      if (ee != longint'(d) - ey) n_esat++;
      check("y (2 taps)", y2, ey);
      check("e (2 taps)", e2, ee);
      acc = 0;
      foreach (p11[k]) acc += longint'(p11[k]);
      ey = sat(acc, W);
      ee = sat(longint'(d) - ey, W);
      check("y (11 taps)", y11, ey);
      check("e (11 taps)", e11, ee);
      #1;
    end
    if (n_ysat == 0 || n_esat == 0) begin
      failures++;
      $display("FAIL coverage: y saturations=%0d e saturations=%0d", n_ysat, n_esat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
