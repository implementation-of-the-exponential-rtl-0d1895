// Test of the predictor of K. The reference evaluates
//   K = C + sum_j x_j (2^-j - ln(1 + u_j)) + plus_one * 2^-63
// in double precision, with each correction term taken from its own series
// u^2/2 - u^3/3 + ... (so no cancellation), and must agree with the 1.63
// output to within 2^-59 (rounding of the eleven constants). When no digit of
// B is set, K is C plus the deferred one and must match exactly.
module tb_predictor;
  import exp_pkg::*;
  logic [FRAC-1:0] x_frac;
  logic            plus_one;
  logic [W-1:0]    k;
  int checks = 0, failures = 0;

  predictor dut (.x_frac, .plus_one, .k);

  function automatic real corr(input int j);
    real u, s, pw;
    u = 2.0 ** (-j);
    if (j == 8) u = u + 2.0 ** (-17);
    // 2^-j - ln(1+u) = (2^-j - u) + u^2/2 - u^3/3 + ...
    s  = (2.0 ** (-j)) - u;
    pw = u;
    for (int n = 2; n < 12; n++) begin
      pw = pw * u;
      s  = (n % 2 == 0) ? s + pw / n : s - pw / n;
    end
    return s;
  endfunction

  task automatic check();
    real want, got;
    #1;
    want = real'(x_frac[44:0]) * (2.0 ** -63);
    for (int j = 8; j <= 18; j++) if (x_frac[63-j]) want = want + corr(j);
    if (plus_one) want = want + 2.0 ** -63;
    got = real'(k) * (2.0 ** -63);
    checks++;
    if ((got - want) > 2.0 ** -59 || (want - got) > 2.0 ** -59 || k[63:47] != 0 ||
        (x_frac[55:45] == 0 && k != W'(x_frac[44:0]) + W'(plus_one))) begin
      failures++;
      if (failures < 10) $display("FAIL x=%h +1=%b K=%h (%e) want %e", x_frac, plus_one, k, got, want);
    end
  endtask

  initial begin
    x_frac = '0; plus_one = 0; check();
    x_frac = '1; plus_one = 1; check();               // largest K
    for (int j = 8; j <= 18; j++) begin               // each constant alone
      x_frac = '0; x_frac[63-j] = 1'b1; plus_one = 0; check();
    end
    for (int i = 0; i < 500; i++) begin               // C and the deferred one only
      x_frac   = '0;
      x_frac[44:0] = 45'({$urandom(), $urandom()});
      plus_one = 1'($urandom());
      check();
    end
    for (int i = 0; i < 3000; i++) begin
      x_frac   = {$urandom(), $urandom()};
      plus_one = 1'($urandom());
      check();
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
