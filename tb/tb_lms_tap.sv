// tb_lms_tap: self-checking test of one multiplexed LMS tap.
//
// Drives random samples, weights updates and scaled errors, including values
// near full scale so that products and weights saturate. After every cycle it
// compares the multiplier output for both multiplexer settings (sel = 1:
// x*w, sel = 0: x*mu_e), the stored sample and the weight with the values of
// the bit-true reference functions in lms_ref_pkg. Both the plain update
// (delta = x*mu_e) and the sign-data update (delta = +/-mu_e) are exercised,
// as is the update-and-shift-in-one-cycle case.
module tb_lms_tap;
  import lms_ref_pkg::*;

  localparam int unsigned W    = 18;
  localparam int unsigned FRAC = 14;

  logic                clk = 1'b0;
  logic                rst_n;
  logic                shift_en, sel, upd_en, sign_data;
  logic signed [W-1:0] x_in, mu_e, x_out, w, prod;

  int checks = 0, failures = 0;
  longint m_x, m_w, exp_prod, delta;
  int n_sat = 0, n_upd = 0, n_sd = 0;

  lms_tap #(.W(W), .FRAC(FRAC)) dut (
    .clk, .rst_n, .shift_en, .sel, .upd_en, .sign_data,
    .x_in, .mu_e, .x_out, .w, .prod
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [W-1:0] rnd(input int big);
    logic signed [W-1:0] v;
    v = W'($urandom);
    if (!big) v = v >>> ($urandom_range(2, 10));
    return v;
  endfunction

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    rst_n = 1'b0; shift_en = 0; sel = 1; upd_en = 0; sign_data = 0;
    x_in = '0; mu_e = '0;
    m_x = 0; m_w = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check("x after reset", x_out, 0);
    check("w after reset", w, 0);

    for (int i = 0; i < 5000; i++) begin
      // new random stimulus, applied away from the clock edge
      shift_en  = ($urandom_range(0, 2) != 0);
      upd_en    = ($urandom_range(0, 1) != 0);
      sign_data = ($urandom_range(0, 3) == 0);
      x_in      = rnd($urandom_range(0, 7) == 0);
      mu_e      = rnd($urandom_range(0, 7) == 0);
      if (i % 97 == 0) mu_e = {1'b1, {(W-1){1'b0}}};
      // filtering operand: x * w
      sel = 1'b1;
      #1;
      exp_prod = qmul(m_x, m_w, FRAC, W);
      check("prod sel=1", prod, exp_prod);
      // update operand: x * mu_e
      sel = 1'b0;
      #1;
      exp_prod = qmul(m_x, mu_e, FRAC, W);
      check("prod sel=0", prod, exp_prod);
      if (sign_data) delta = (m_x < 0) ? sat(-longint'(mu_e), W) : longint'(mu_e);
      else           delta = exp_prod;
      @(posedge clk);
      if (upd_en) begin
        if (sat(m_w + delta, W) != m_w + delta) n_sat++;
        m_w = sat(m_w + delta, W);
        n_upd++;
        if (sign_data) n_sd++;
      end
      if (shift_en) m_x = x_in;
      #1;
      check("x_out", x_out, m_x);
      check("w", w, m_w);
    end
    if (n_sat == 0 || n_upd == 0 || n_sd == 0) begin
      failures++;
      $display("FAIL coverage: saturations=%0d updates=%0d sign-data=%0d", n_sat, n_upd, n_sd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
