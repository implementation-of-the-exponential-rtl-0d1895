// Test of the issue control. Random requests arrive on both ports; a
// reference model that only remembers when the last exponential started
// (its cycle 1 is the cycle after the transfer) predicts both ready signals:
// an exponential may start unless the previous one is in cycles 1-5, a
// multiplication unless the array is taken next cycle (exponential in cycles
// 1, 2, 3, 4 or 6). It also checks the phase and the load strobe, the
// six-cycle spacing of back-to-back exponentials and that a multiplication
// waits exactly five cycles when an exponential arrives in a stream of
// multiplications (cycles 2-5 and 7).
module tb_exp_issue_ctrl;
  import exp_pkg::*;
  logic   clk = 1'b0, rst_n;
  logic   exp_valid, exp_ready, mul_valid, mul_ready, exp_fire, mul_fire, s1_load;
  phase_e phase;
  int checks = 0, failures = 0;
  int c = 0;            // cycle of the last exponential now (0: none)
  int n_overlap = 0, n_stall = 0;
  logic fired;

  always #5 clk = ~clk;

  exp_issue_ctrl dut (.*);

  task automatic expect_now();
    logic want_e, want_m, want_l;
    want_e = !(c >= 1 && c <= 5);
    want_m = !(c inside {1, 2, 3, 4, 6});
    want_l = (c inside {1, 2, 3, 4, 6});
    checks++;
    if (exp_ready !== want_e || mul_ready !== want_m || s1_load !== want_l ||
        int'(phase) !== ((c >= 1 && c <= 6) ? c : 0)) begin
      failures++;
      if (failures < 10) $display("FAIL cycle %0d: ready %b%b load %b phase %0d", c,
                                  exp_ready, mul_ready, s1_load, phase);
    end
  endtask

  initial begin
    exp_valid = 0; mul_valid = 0;
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // random traffic
    for (int i = 0; i < 3000; i++) begin
      exp_valid = ($urandom_range(0, 3) == 0);
      mul_valid = ($urandom_range(0, 1) == 0);
      #1 expect_now();
      if (exp_fire && c == 6) n_overlap++;
      fired = exp_fire;
      @(negedge clk);
      if (fired) c = 1; else if (c != 0) c = (c == 6) ? 0 : c + 1;
    end
    // multiplication stream with one exponential: count the stalled cycles
    exp_valid = 0; mul_valid = 0;
    repeat (10) @(negedge clk);
    c = 0;
    mul_valid = 1;
    exp_valid = 1;
    @(negedge clk);
    exp_valid = 0;
    for (int i = 0; i < 12; i++) begin
      if (!mul_ready) n_stall++;
      @(negedge clk);
    end
    mul_valid = 0;
    checks++;
    if (n_stall != 5 || n_overlap == 0) begin
      failures++;
      $display("FAIL stalls %0d overlaps %0d", n_stall, n_overlap);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
