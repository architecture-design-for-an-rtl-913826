// tb_lms_equalizer: end-to-end test of the LMS equalizer at its default size.
//
// A training sequence of random +/-0.5 symbols s(n) is sent through a channel
// with inter-symbol interference, x(n) = s(n) + 0.4 s(n-1) + noise, and the
// equalizer is trained towards d(n) = s(n). The test runs one training
// segment (from reset) for each update rule: LMS, sign-data, sign-error and
// sign-sign. Then a segment switches the rule at random on every sample, and
// a last segment drives full-scale samples with a large step size so that
// the output, the error and the weights saturate.
//
// Every output is compared bit for bit with the reference model in
// lms_ref_pkg: y(n) and e(n) when out_valid pulses, and all weights on the
// next cycle, after their update is written. It checks the timing: out_valid
// two cycles after a sample is accepted, and one sample per two cycles in a
// back-to-back stream. For each training segment it checks that the mean
// squared error of the last 100 samples is below a quarter of that of the
// first 100 (convergence). The mechanisms of the design are counted and each
// must occur: filtering passes, update passes, a sample accepted during an
// update pass, each of the four rules, a change of rule between samples, and
// saturation.
module tb_lms_equalizer;
  import lms_pkg::*;
  import lms_ref_pkg::*;

  localparam int unsigned NTAPS = LMS_NTAPS;
  localparam int unsigned W     = LMS_W;
  localparam int unsigned FRAC  = LMS_FRAC;
  localparam longint      ONE   = longint'(1) << FRAC;

  logic                clk = 1'b0;
  logic                rst_n;
  logic                in_valid, in_ready, out_valid;
  logic signed [W-1:0] x_in, d_in, mu, y_out, e_out;
  logic signed [W-1:0] w_out[NTAPS];
  lms_mode_e           mode;

  lms_equalizer dut (
    .clk, .rst_n, .in_valid, .in_ready, .x_in, .d_in, .mu, .mode,
    .out_valid, .y_out, .e_out, .w_out
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // expected results, one entry per accepted sample
  typedef struct {
    longint y, e;
    longint wt[NTAPS];
    int     acc_cycle;
  } exp_t;
  exp_t q[$];

  lms_model model;

  // mechanism counters
  int n_filter = 0, n_update = 0, n_overlap = 0, n_switch = 0, n_sat = 0;
  int n_mode[4] = '{0, 0, 0, 0};
  int last_mode = -1;

  // per-segment error energy
  longint err2[$];

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d: got %0d expected %0d",
                                  what, cycle, got, exp);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Monitor: filtering and update passes, outputs and weights.
  exp_t cur;
  logic chk_w = 1'b0;
  always @(negedge clk) if (rst_n) begin
    // in_ready is low only in a filtering pass; out_valid marks an update pass
    if (!in_ready) n_filter++;
    if (out_valid) n_update++;
    if (out_valid && in_valid && in_ready) n_overlap++;
    if (chk_w) begin
      for (int k = 0; k < int'(NTAPS); k++) check($sformatf("w[%0d]", k), w_out[k], cur.wt[k]);
      chk_w = 1'b0;
    end
    if (out_valid) begin
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL out_valid without a sample at cycle %0d", cycle);
      end else begin
        cur = q.pop_front();
        check("y", y_out, cur.y);
        check("e", e_out, cur.e);
        check("latency", cycle - cur.acc_cycle, 2);
        err2.push_back(longint'(e_out) * longint'(e_out));
        chk_w = 1'b1;
      end
    end
  end

  // Offer one sample; return when it has been accepted.
  task automatic send(input longint xn, input longint dn, input longint mun,
                      input int md, input bit gap);
    exp_t ex;
    if (gap) begin
      in_valid = 1'b0;
      repeat ($urandom_range(1, 3)) @(posedge clk);
      #1;
    end
    x_in = W'(xn); d_in = W'(dn); mu = W'(mun); mode = lms_mode_e'(md);
    in_valid = 1'b1;
    @(negedge clk);
    while (!in_ready) begin
      @(posedge clk); #1;
      @(negedge clk);
    end
    model.step(sext(xn, W), sext(dn, W), sext(mun, W), md);
    ex.y = model.y;
    ex.e = model.e;
    foreach (ex.wt[k]) ex.wt[k] = model.wt[k];
    ex.acc_cycle = cycle;
    q.push_back(ex);
    n_mode[md]++;
    if (last_mode >= 0 && last_mode != md) n_switch++;
    last_mode = md;
    if (model.y == (1 <<< (W-1)) - 1 || model.y == -(1 <<< (W-1)) ||
        model.e == (1 <<< (W-1)) - 1 || model.e == -(1 <<< (W-1))) n_sat++;
    foreach (model.wt[k])
      if (model.wt[k] == (1 <<< (W-1)) - 1 || model.wt[k] == -(1 <<< (W-1))) n_sat++;
    @(posedge clk); #1;
  endtask

  task automatic do_reset();
    in_valid = 1'b0;
    @(posedge clk); #1;
    // let the last sample finish before clearing
    repeat (3) @(posedge clk); #1;
    rst_n = 1'b0;
    model.reset();
    q.delete();
    last_mode = -1;
    repeat (2) @(posedge clk); #1;
    rst_n = 1'b1;
  endtask

  // Channel with inter-symbol interference.
  longint s_prev = 0;
  function automatic void channel(output longint xn, output longint sn);
    longint noise;
    sn = ($urandom_range(0, 1) != 0) ? ONE / 2 : -ONE / 2;
    noise = longint'($urandom_range(0, 200)) - 100;
    xn = sn + (s_prev * 4) / 10 + noise;
    s_prev = sn;
  endfunction

  // One training segment from reset with a fixed rule; checks convergence.
  task automatic train(input int md, input longint mun, input int n);
    longint xn, sn, first, last;
    int start;
    do_reset();
    err2.delete();
    s_prev = 0;
    start = cycle;
    for (int i = 0; i < n; i++) begin
      channel(xn, sn);
      send(xn, sn, mun, md, (i % 50) == 7);
    end
    in_valid = 1'b0;
    repeat (4) @(posedge clk); #1;
    first = 0; last = 0;
    for (int i = 0; i < 100; i++) begin
      first += err2[i];
      last  += err2[err2.size() - 1 - i];
    end
    checks++;
    if (!(last * 4 < first)) begin
      failures++;
      $display("FAIL rule %0d did not converge: error energy %0d -> %0d", md, first, last);
    end else
      $display("rule %0d: error energy of first/last 100 samples %0d -> %0d, weights %0d %0d",
               md, first, last, model.wt[0], model.wt[NTAPS-1]);
  endtask

  initial begin
    longint xn, sn;
    int start, n_acc;
    model = new(NTAPS, W, FRAC);
    rst_n = 1'b0; in_valid = 1'b0;
    x_in = '0; d_in = '0; mu = '0; mode = MODE_LMS;
    repeat (3) @(posedge clk); #1;
    rst_n = 1'b1;

    train(int'(MODE_LMS),        ONE / 20,  1500);
    train(int'(MODE_SIGN_DATA),  ONE / 20,  1500);
    train(int'(MODE_SIGN_ERROR), ONE / 100, 1500);
    train(int'(MODE_SIGN_SIGN),  ONE / 500, 2000);

    // Rule changed on every sample; also checks the streaming rate.
    do_reset();
    s_prev = 0;
    n_acc = 0;
    start = cycle;
    for (int i = 0; i < 400; i++) begin
      channel(xn, sn);
      send(xn, sn, ONE / 100, $urandom_range(0, 3), 1'b0);
    end
    checks++;
    if (cycle - start != 2 * 400 - 1) begin
      failures++;
      $display("FAIL 400 back-to-back samples took %0d cycles, expected %0d",
               cycle - start, 2 * 400 - 1);
    end

    // Full-scale stress: saturation of output, error and weights.
    do_reset();
    for (int i = 0; i < 400; i++)
      send(sext($urandom, W), sext($urandom, W), ONE * 3 / 2,
           $urandom_range(0, 3), ($urandom_range(0, 3) == 0));
    in_valid = 1'b0;
    repeat (5) @(posedge clk);

    $display("filter passes %0d, update passes %0d, overlapped accepts %0d",
             n_filter, n_update, n_overlap);
    $display("samples per rule LMS %0d, sign-data %0d, sign-error %0d, sign-sign %0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3]);
    $display("rule switches %0d, saturation events %0d", n_switch, n_sat);
    checks++;
    if (n_filter == 0 || n_update == 0 || n_overlap == 0 || n_switch == 0 || n_sat == 0 ||
        n_mode[0] == 0 || n_mode[1] == 0 || n_mode[2] == 0 || n_mode[3] == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d samples without output", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
