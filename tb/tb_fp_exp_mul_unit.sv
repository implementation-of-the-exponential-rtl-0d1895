// End-to-end test of the exponential-capable multiplier at its default size.
//
// Drives exponentials and multiplications through the two issue ports and
// keeps a scoreboard indexed by tag. Exponentials are compared with the
// simulator's exp() (within 2 units in the last place: the unit's own 1-ulp
// error plus the rounding of y, which the exp(z) model delivers rounded);
// multiplications are compared bit for bit with the simulator's IEEE product.
// Every result must appear in the output register at the end of the
// exponential's ninth cycle or the multiplication's third cycle (cycle 1 being
// the one after the transfer).
//
// Phases: isolated operations, special operands, then mixed streams with both
// ports kept busy. Counted mechanisms: multiplication stalled by an
// exponential, exponential started in its predecessor's cycle 7, a
// multiplication sharing the exponential's cycles 1 and 6, the shifted
// feedback of R2 and R4, halved table entries, negative arguments (deferred
// +1), special results, overflow and underflow. Each must occur.
//
// Rates checked exactly: a burst of multiplications is accepted one per
// cycle; a stream of exponentials is accepted one every six cycles; a single
// exponential dropped into a chain of multiplications holds the chain back
// for five cycles (the array is taken in the exponential's cycles 2 to 5 and
// 7).
module tb_fp_exp_mul_unit;
  import exp_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic                   exp_valid, exp_ready, mul_valid, mul_ready;
  logic [63:0]            exp_x, mul_a, mul_b;
  rm_e                    exp_rm, mul_rm;
  logic [TAGW-1:0]        exp_tag, mul_tag;
  logic                   expz_valid;
  logic signed [ZW-1:0]   expz_z;
  logic [52:0]            expz_sig;
  logic signed [EXPW-1:0] expz_exp;
  logic                   out_valid, out_is_exp;
  logic [TAGW-1:0]        out_tag;
  logic [63:0]            out_result;
  fflags_t                out_flags;

  fp_exp_mul_unit dut (.*);
  expz_model u_expz (.z(expz_z), .sig(expz_sig), .e(expz_exp));

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // scoreboard
  logic        sb_busy   [256];
  logic        sb_is_exp [256];
  logic [63:0] sb_exp_val[256];   // expected bits
  fflags_t     sb_flags  [256];
  logic        sb_chkflg [256];   // compare flags too
  int          sb_tol    [256];   // ulps allowed
  longint      sb_cycle  [256];
  logic [TAGW-2:0] exp_cnt = 0, mul_cnt = 0;   // exp tags {1,cnt}, mul tags {0,cnt}
  int n_exp_issued = 0, n_mul_issued = 0;

  // mechanism counters
  int n_mul_stall = 0, n_exp_overlap = 0, n_mul_c1 = 0, n_mul_c6 = 0;
  int n_r2_shift = 0, n_r4_shift = 0, n_half = 0, n_neg = 0;
  int n_special = 0, n_of = 0, n_uf = 0, n_exp_done = 0, n_mul_done = 0;
  real max_ulp = 0.0;

  // rate measurements
  logic   in_stream = 1'b0, in_burst = 1'b0, in_chain = 1'b0;
  longint last_exp_fire = -1, first_burst = -1, last_burst = -1;
  int     n_gap6 = 0, n_gap_other = 0, n_burst = 0, n_chain_stall = 0;

  // sampled mid-cycle, where the handshake signals are stable
  always @(negedge clk) if (rst_n) begin
    if (mul_valid && !mul_ready) n_mul_stall++;
    if (exp_valid && exp_ready && dut.phase == PH_C6) n_exp_overlap++;
    if (mul_valid && mul_ready && exp_valid && exp_ready && dut.phase == PH_IDLE) n_mul_c1++;
    if (mul_valid && mul_ready && dut.phase == PH_C5) n_mul_c6++;
    if (dut.phase == PH_C4 && dut.fb_right_shift) n_r2_shift++;
    if (dut.phase == PH_C6 && dut.fb_right_shift) n_r4_shift++;
    if (dut.phase == PH_T && dut.tab_half) n_half++;
    if (dut.phase == PH_DG && dut.plus_one) n_neg++;
    if (in_stream && exp_valid && exp_ready) begin
      if (last_exp_fire >= 0) begin
        if (cycle - last_exp_fire == 6) n_gap6++;
        else n_gap_other++;
      end
      last_exp_fire = cycle;
    end
    if (in_burst && mul_valid && mul_ready) begin
      if (first_burst < 0) first_burst = cycle;
      last_burst = cycle;
      n_burst++;
    end
    if (in_chain && mul_valid && !mul_ready) n_chain_stall++;
  end

  function automatic longint ulp_dist(input logic [63:0] a, input logic [63:0] b);
    longint d;
    d = longint'(a) - longint'(b);
    return d < 0 ? -d : d;
  endfunction

  // result checker
  always @(negedge clk) if (rst_n && out_valid) begin
    longint d;
    checks++;
    if (!sb_busy[out_tag]) begin
      failures++;
      $display("FAIL unexpected result tag %0d", out_tag);
    end else begin
      d = ulp_dist(out_result, sb_exp_val[out_tag]);
      if (out_is_exp != sb_is_exp[out_tag] || d > sb_tol[out_tag] ||
          (sb_chkflg[out_tag] && out_flags != sb_flags[out_tag])) begin
        failures++;
        $display("FAIL tag %0d exp=%0b got %h flags %b want %h flags %b (dist %0d)",
                 out_tag, out_is_exp, out_result, out_flags, sb_exp_val[out_tag],
                 sb_flags[out_tag], d);
      end
      if (out_is_exp && !sb_chkflg[out_tag] && real'(d) > max_ulp) max_ulp = real'(d);
      checks++;
      if (cycle - sb_cycle[out_tag] != (sb_is_exp[out_tag] ? 9 : 3)) begin
        failures++;
        $display("FAIL tag %0d latency %0d", out_tag, cycle - sb_cycle[out_tag]);
      end
      if (out_flags.of) n_of++;
      if (out_flags.uf) n_uf++;
      if (out_is_exp) n_exp_done++; else n_mul_done++;
      sb_busy[out_tag] = 1'b0;
    end
  end

  // expected values --------------------------------------------------------
  task automatic expect_exp(input logic [TAGW-1:0] t, input logic [63:0] x);
    real xr, r;
    sb_is_exp[t] = 1'b1;
    sb_chkflg[t] = 1'b0;
    sb_tol[t]    = 2;
    sb_flags[t]  = '0;
    xr = $bitstoreal(x);
    if (x[62:52] == 11'h7FF && x[51:0] != 0) begin
      sb_exp_val[t] = {1'b0, 11'h7FF, 1'b1, x[50:0]};
      sb_chkflg[t] = 1'b1; sb_tol[t] = 0; sb_flags[t].nv = ~x[51];
      n_special++;
    end else if (x[62:52] == 11'h7FF) begin
      sb_exp_val[t] = x[63] ? 64'h0 : 64'h7FF0_0000_0000_0000;
      sb_chkflg[t] = 1'b1; sb_tol[t] = 0;
      n_special++;
    end else if (xr > 709.7) begin
      sb_exp_val[t] = 64'h7FF0_0000_0000_0000;
      sb_chkflg[t] = 1'b1; sb_tol[t] = 0; sb_flags[t].of = 1'b1; sb_flags[t].nx = 1'b1;
      if (x[62:52] > 11'd1034) n_special++;
    end else if (xr < -708.3) begin
      sb_exp_val[t] = 64'h0;
      sb_chkflg[t] = 1'b1; sb_tol[t] = 0; sb_flags[t].uf = 1'b1; sb_flags[t].nx = 1'b1;
      if (x[62:52] > 11'd1034) n_special++;
    end else begin
      r = $exp(xr);
      sb_exp_val[t] = $realtobits(r);
    end
  endtask

  task automatic expect_mul(input logic [TAGW-1:0] t, input logic [63:0] a, input logic [63:0] b);
    real r;
    sb_is_exp[t] = 1'b0;
    sb_chkflg[t] = 1'b0;
    sb_tol[t]    = 0;
    sb_flags[t]  = '0;
    r = $bitstoreal(a) * $bitstoreal(b);
    sb_exp_val[t] = $realtobits(r);
    if (a[62:52] == 11'h7FF || b[62:52] == 11'h7FF || a[62:52] == 0 || b[62:52] == 0) begin
      sb_chkflg[t] = 1'b1;
      if ((a[62:52] == 11'h7FF && a[51:0] != 0) || (b[62:52] == 11'h7FF && b[51:0] != 0)) begin
        sb_exp_val[t] = (a[62:52] == 11'h7FF && a[51:0] != 0) ? (a | 64'h0008_0000_0000_0000)
                                                              : (b | 64'h0008_0000_0000_0000);
        sb_flags[t].nv = 1'b1;   // the directed NaNs below are signalling
      end else if ((a[62:52] == 11'h7FF && b[62:52] == 0) || (b[62:52] == 11'h7FF && a[62:52] == 0)) begin
        sb_exp_val[t] = 64'h7FF8_0000_0000_0000;
        sb_flags[t].nv = 1'b1;
      end
      n_special++;
    end
  endtask

  // random operands ----------------------------------------------------------
  function automatic logic [63:0] rand_arg();
    logic [63:0] v;
    int e;
    int sel;
    sel = int'($urandom_range(0, 9));
    if (sel < 6)      e = int'($urandom_range(0, 9));      // |X| in [1, 1024)
    else if (sel < 9) e = -int'($urandom_range(1, 62));    // small arguments
    else              e = -int'($urandom_range(63, 200));  // tiny arguments
    v = {$urandom(), $urandom()};
    v[62:52] = 11'(1023 + e);
    if (e == 9) v[51:50] = 2'b00;                            // |X| < 640
    return v;
  endfunction

  function automatic logic [63:0] rand_mul_op();
    logic [63:0] v;
    v = {$urandom(), $urandom()};
    v[62:52] = 11'(1023 + int'($urandom_range(0, 400)) - 200);
    return v;
  endfunction

  // issue helpers --------------------------------------------------------------
  task automatic issue_exp(input logic [63:0] x);
    logic [TAGW-1:0] t;
    t = {1'b1, exp_cnt};
    exp_valid = 1'b1; exp_x = x; exp_tag = t; exp_rm = RM_RNE;
    while (!exp_ready) @(negedge clk);
    @(negedge clk);                      // the transfer happened at this posedge
    sb_busy[t] = 1'b1; sb_cycle[t] = cycle; expect_exp(t, x);
    exp_cnt++; n_exp_issued++;
    exp_valid = 1'b0;
  endtask

  task automatic issue_mul(input logic [63:0] a, input logic [63:0] b);
    logic [TAGW-1:0] t;
    t = {1'b0, mul_cnt};
    mul_valid = 1'b1; mul_a = a; mul_b = b; mul_tag = t; mul_rm = RM_RNE;
    while (!mul_ready) @(negedge clk);
    @(negedge clk);
    sb_busy[t] = 1'b1; sb_cycle[t] = cycle; expect_mul(t, a, b);
    mul_cnt++; n_mul_issued++;
    mul_valid = 1'b0;
  endtask

  task automatic drain();
    repeat (14) @(negedge clk);
  endtask

  // directed arguments
  logic [63:0] dir_args [15] = '{
    64'h0000_0000_0000_0000,  // +0 -> 1
    64'h8000_0000_0000_0000,  // -0 -> 1
    64'h3FF0_0000_0000_0000,  // 1
    64'hBFF0_0000_0000_0000,  // -1 (fraction all zero: carry through +1)
    64'h3FE6_2E42_FEFA_39EF,  // ln 2
    64'h7FF0_0000_0000_0000,  // +inf
    64'hFFF0_0000_0000_0000,  // -inf
    64'h7FF4_0000_0000_0000,  // signalling NaN
    64'h40B3_8800_0000_0000,  // 5000 (beyond e_m)
    64'hC0B3_8800_0000_0000,  // -5000
    64'h4089_0000_0000_0000,  // 800 (overflows in the rounder)
    64'hC089_0000_0000_0000,  // -800 (underflows)
    64'h4086_2000_0000_0000,  // 708
    64'hC086_1800_0000_0000,  // -707
    64'h3B00_0000_0000_0000   // 2^-79 (vanishes in the truncation -> 1, inexact)
  };

  int n_stream;

  initial begin
    exp_valid = 0; mul_valid = 0; exp_x = 0; mul_a = 0; mul_b = 0;
    exp_tag = 0; mul_tag = 0; exp_rm = RM_RNE; mul_rm = RM_RNE;
    for (int i = 0; i < 256; i++) sb_busy[i] = 1'b0;
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);

    // 1. isolated exponentials and multiplications
    foreach (dir_args[i]) begin issue_exp(dir_args[i]); drain(); end
    for (int i = 0; i < 40; i++) begin issue_exp(rand_arg()); drain(); end
    for (int i = 0; i < 20; i++) begin issue_mul(rand_mul_op(), rand_mul_op()); drain(); end
    issue_mul(64'h7FF0_0000_0000_0000, 64'h0);               drain();
    issue_mul(64'h7FF4_0000_0000_0000, 64'h3FF0_0000_0000_0000); drain();
    issue_mul(64'hC000_0000_0000_0000, 64'h7FF0_0000_0000_0000); drain();
    issue_mul(64'h3FF8_0000_0000_0000, 64'h8000_0000_0000_0000); drain();
    // an exponential and a multiplication issued together, then one in cycle 6
    fork
      issue_exp(rand_arg());
      issue_mul(rand_mul_op(), rand_mul_op());
    join
    repeat (3) @(negedge clk);
    issue_mul(rand_mul_op(), rand_mul_op());
    drain();

    // 2. a burst of multiplications, then one exponential inside a chain
    in_burst = 1'b1;
    for (int i = 0; i < 40; i++) issue_mul(rand_mul_op(), rand_mul_op());
    in_burst = 1'b0;
    drain();
    checks++;
    if (n_burst != 40 || last_burst - first_burst != 39) begin
      failures++;
      $display("FAIL burst: %0d multiplications over %0d cycles", n_burst, last_burst - first_burst + 1);
    end
    in_chain = 1'b1;
    fork
      for (int i = 0; i < 30; i++) issue_mul(rand_mul_op(), rand_mul_op());
      begin repeat (10) @(negedge clk); issue_exp(rand_arg()); end
    join
    in_chain = 1'b0;
    drain();
    checks++;
    if (n_chain_stall != 5) begin
      failures++;
      $display("FAIL chain: multiplications held for %0d cycles, expected 5", n_chain_stall);
    end

    // 3. both ports busy: exponentials back to back, multiplications filling in
    n_stream = 0;
    in_stream = 1'b1;
    fork
      for (int i = 0; i < 300; i++) issue_exp(rand_arg());
      begin
        @(negedge clk);
        while (n_stream < 600) begin
          issue_mul(rand_mul_op(), rand_mul_op());
          n_stream++;
        end
      end
    join
    in_stream = 1'b0;
    drain();
    checks++;
    if (n_gap6 != 299 || n_gap_other != 0) begin
      failures++;
      $display("FAIL exponential stream: %0d gaps of 6 cycles, %0d others", n_gap6, n_gap_other);
    end

    // 4. checks on the mechanisms and the exponential throughput
    checks++;
    if (n_mul_stall == 0 || n_exp_overlap == 0 || n_mul_c1 == 0 || n_mul_c6 == 0 ||
        n_r2_shift == 0 || n_r4_shift == 0 || n_half == 0 || n_neg == 0 ||
        n_special == 0 || n_of == 0 || n_uf == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    checks++;
    if (n_exp_done != n_exp_issued || n_mul_done != n_mul_issued) begin
      failures++;
      $display("FAIL results: %0d exponentials, %0d multiplications", n_exp_done, n_mul_done);
    end
    $display("burst=%0d chain_stall=%0d gaps6=%0d", n_burst, n_chain_stall, n_gap6);
    $display("stalls=%0d overlap=%0d mul_c1=%0d mul_c6=%0d r2shift=%0d r4shift=%0d half=%0d neg=%0d special=%0d of=%0d uf=%0d max_ulp=%0.0f",
             n_mul_stall, n_exp_overlap, n_mul_c1, n_mul_c6, n_r2_shift, n_r4_shift,
             n_half, n_neg, n_special, n_of, n_uf, max_ulp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
