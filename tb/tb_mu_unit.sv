// tb_mu_unit: self-checking test of the common step-size multiplier.
//
// For random step sizes and errors (including zero, negative and full-scale
// errors) it checks mu_e = sat(floor(mu*e / 2^FRAC)) when the plain error is
// used, and mu_e = +mu / -mu by the sign of e when the sign of the error is
// used, against an independent 64-bit computation.
module tb_mu_unit;
  import lms_ref_pkg::*;

  localparam int unsigned W    = 18;
  localparam int unsigned FRAC = 14;

  logic signed [W-1:0] mu, e, mu_e;
  logic                sign_error;

  int checks = 0, failures = 0;
  int n_sat = 0;

  mu_unit #(.W(W), .FRAC(FRAC)) dut (.mu, .e, .sign_error, .mu_e);

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
      if (failures < 20) $display("FAIL %s: mu=%0d e=%0d got %0d expected %0d",
                                  what, mu, e, got, exp);
    end
  endtask

  initial begin
    longint p, ex;
    for (int i = 0; i < 5000; i++) begin
      mu = W'($urandom_range(0, (1 << (W - 1)) - 1));
      if (i % 3 == 0) mu = mu >>> 6;
      e  = W'($urandom);
      if (i % 5 == 0) e = '0;
      if (i % 7 == 0) e = {1'b1, {(W-1){1'b0}}};
      sign_error = 1'b0;
      #1;
      p  = longint'(mu) * longint'(e);
      ex = sat(p >>> FRAC, W);
      if (ex != (p >>> FRAC)) n_sat++;
      check("mu*e", mu_e, ex);
      sign_error = 1'b1;
      #1;
      ex = (e < 0) ? -longint'(mu) : longint'(mu);
      check("mu*sign(e)", mu_e, ex);
    end
    if (n_sat == 0) begin
      failures++;
      $display("FAIL coverage: no saturated product");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
