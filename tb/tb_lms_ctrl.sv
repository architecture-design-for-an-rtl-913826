// tb_lms_ctrl: self-checking test of the filter/update sequencer.
//
// Offers samples with random gaps and checks, cycle by cycle, that an
// accepted sample (in_valid && in_ready) gives exactly one filtering cycle
// (sel = 1, cap_en) one cycle later and exactly one update cycle (sel = 0,
// upd_en, out_valid) two cycles later, and that in_ready is low only in the
// filtering cycle. It then streams 200 back-to-back samples and checks the
// rate of one sample every two cycles.
module tb_lms_ctrl;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid, in_ready, shift_en, sel, cap_en, upd_en, out_valid;

  int checks = 0, failures = 0;
  int cycle = 0;
  logic acc_d1 = 1'b0, acc_d2 = 1'b0;  // acceptance one and two cycles ago
  int n_overlap = 0;

  lms_ctrl dut (.clk, .rst_n, .in_valid, .in_ready, .shift_en, .sel,
                .cap_en, .upd_en, .out_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d: got %0b expected %0b",
                                  what, cycle, got, exp);
    end
  endtask

  // Compare the outputs in every cycle, just before the clock edge.
  always @(negedge clk) if (rst_n) begin
    check("cap_en",    cap_en,    acc_d1);
    check("upd_en",    upd_en,    acc_d2);
    check("out_valid", out_valid, acc_d2);
    if (acc_d1) check("sel in filter pass", sel, 1'b1);
    if (acc_d2) check("sel in update pass", sel, 1'b0);
    check("in_ready",  in_ready,  !acc_d1);
    check("shift_en",  shift_en,  in_valid && !acc_d1);
    if (shift_en && acc_d2) n_overlap++;
  end

  always @(posedge clk) begin
    cycle  <= cycle + 1;
    acc_d2 <= acc_d1;
    acc_d1 <= rst_n && in_valid && in_ready;
  end

  initial begin
    int accepted, start;
    rst_n = 1'b0; in_valid = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // random traffic
    for (int i = 0; i < 2000; i++) begin
      in_valid = ($urandom_range(0, 2) != 0);
      @(posedge clk); #1;
    end
    in_valid = 1'b0;
    repeat (4) @(posedge clk); #1;
    // back-to-back stream: one sample per two cycles
    accepted = 0;
    in_valid = 1'b1;
    start = cycle;
    while (accepted < 200) begin
      @(negedge clk);
      if (in_valid && in_ready) accepted++;
      @(posedge clk); #1;
    end
    in_valid = 1'b0;
    checks++;
    if (cycle - start != 2 * 200 - 1) begin
      failures++;
      $display("FAIL stream of 200 samples took %0d cycles, expected %0d",
               cycle - start, 2 * 200 - 1);
    end
    checks++;
    if (n_overlap == 0) begin
      failures++;
      $display("FAIL no sample was accepted during an update pass");
    end
    repeat (4) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
