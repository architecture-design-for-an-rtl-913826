// tb_equalizer_11tap: learning curves of an eleven-tap equalizer for the four
// update rules, averaged over 50 independent training runs.
//
// The equalizer is instantiated with NTAPS = 11. Random +/-1 symbols pass a
// three-tap raised-cosine channel h = [0.2197, 1.0, 0.2197] (raised cosine
// with W = 2.9) plus uniform noise of about 0.01 rms; the desired response
// is the symbol delayed by 7 samples, which puts the main tap of the trained
// equalizer near the middle. For each rule (LMS, sign-data, sign-error,
// sign-sign) 50 runs of NSAMP samples start from reset, the squared error of
// each sample is accumulated per time index, and the averaged learning curve
// must fall by more than a factor of ten from its first 20 samples to its
// last 100. Every output and weight is also compared bit for bit with the
// reference model in lms_ref_pkg.
module tb_equalizer_11tap;
  import lms_pkg::*;
  import lms_ref_pkg::*;

  localparam int unsigned NTAPS = 11;
  localparam int unsigned W     = LMS_W;
  localparam int unsigned FRAC  = LMS_FRAC;
  localparam longint      ONE   = longint'(1) << FRAC;
  localparam int          NRUNS = 50;
  localparam int          NSAMP = 800;
  localparam int          DELAY = 7;

  logic                clk = 1'b0;
  logic                rst_n;
  logic                in_valid, in_ready, out_valid;
  logic signed [W-1:0] x_in, d_in, mu, y_out, e_out;
  logic signed [W-1:0] w_out[NTAPS];
  lms_mode_e           mode;

  lms_equalizer #(.NTAPS(NTAPS)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .x_in, .d_in, .mu, .mode,
    .out_valid, .y_out, .e_out, .w_out
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  lms_model model;
  longint curve[NSAMP];

  // expected results, one entry per accepted sample
  typedef struct {
    longint y, e;
    longint wt[NTAPS];
    int     idx;
  } exp_t;
  exp_t q[$];
  exp_t cur;
  logic chk_w = 1'b0;

  // Monitor: compare outputs, then the weights one cycle later.
  always @(negedge clk) if (rst_n) begin
    if (chk_w) begin
      if (cur.idx % 50 == 0 || cur.idx == NSAMP - 1)
        foreach (cur.wt[k]) check("w", w_out[k], cur.wt[k]);
      chk_w = 1'b0;
    end
    if (out_valid) begin
      cur = q.pop_front();
      check("y", y_out, cur.y);
      check("e", e_out, cur.e);
      curve[cur.idx] += longint'(e_out) * longint'(e_out);
      chk_w = 1'b1;
    end
  end

  initial begin
    repeat (3000000) @(posedge clk);
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

  // raised-cosine channel taps in Q.FRAC
  localparam longint H0 = (ONE * 2197) / 10000;
  localparam longint H1 = ONE;

  task automatic run_rule(input int md, input longint mun);
    longint s[$];
    longint sn, xn, dn, first, last;
    exp_t ex;
    foreach (curve[i]) curve[i] = 0;
    for (int r = 0; r < NRUNS; r++) begin
      rst_n = 1'b0;
      model.reset();
      s.delete();
      repeat (3) s.push_back(0);
      repeat (2) @(posedge clk); #1;
      rst_n = 1'b1;
      for (int n = 0; n < NSAMP; n++) begin
        sn = ($urandom_range(0, 1) != 0) ? ONE : -ONE;
        s.push_front(sn);
        xn = (H0 * s[1] + H1 * s[2] + H0 * s[3]) / ONE
             + longint'($urandom_range(0, 600)) - 300;
        dn = (s.size() > DELAY + 2) ? s[DELAY] : 0;
        if (s.size() > 16) void'(s.pop_back());
        x_in = W'(xn); d_in = W'(dn); mu = W'(mun); mode = lms_mode_e'(md);
        in_valid = 1'b1;
        @(negedge clk);
        while (!in_ready) begin
          @(posedge clk); #1;
          @(negedge clk);
        end
        model.step(xn, dn, mun, md);
        ex.y = model.y;
        ex.e = model.e;
        foreach (ex.wt[k]) ex.wt[k] = model.wt[k];
        ex.idx = n;
        q.push_back(ex);
        @(posedge clk); #1;
      end
      in_valid = 1'b0;
      repeat (4) @(posedge clk); #1;
    end
    first = 0; last = 0;
    for (int i = 0; i < 20; i++)  first += curve[i] / 20;
    for (int i = 0; i < 100; i++) last  += curve[NSAMP - 1 - i] / 100;
    $display("rule %0d (mu = %0d/%0d): mean squared error over %0d runs %.5f -> %.5f",
             md, mun, ONE, NRUNS,
             real'(first) / NRUNS / real'(ONE * ONE), real'(last) / NRUNS / real'(ONE * ONE));
    $display("  final weights of the last run:");
    for (int k = 0; k < int'(NTAPS); k++) $write(" %.3f", real'(model.wt[k]) / ONE);
    $write("\n");
    checks++;
    if (!(last * 10 < first)) begin
      failures++;
      $display("FAIL rule %0d: learning curve did not fall tenfold", md);
    end
  endtask

  initial begin
    model = new(NTAPS, W, FRAC);
    in_valid = 1'b0;
    x_in = '0; d_in = '0; mu = '0; mode = MODE_LMS;
    run_rule(int'(MODE_LMS),        (ONE * 75) / 1000);
    run_rule(int'(MODE_SIGN_DATA),  (ONE * 20) / 1000);
    run_rule(int'(MODE_SIGN_ERROR), (ONE * 10) / 1000);
    run_rule(int'(MODE_SIGN_SIGN),  (ONE * 2) / 1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
