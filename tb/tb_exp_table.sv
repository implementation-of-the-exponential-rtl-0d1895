// Test of the exp(A) table: every one of the 128 entries is compared with
// the simulator's exp(i/128), halved where it is 2 or more, and the halving
// flag is checked against ln 2.
module tb_exp_table;
  import exp_pkg::*;
  logic [P-1:0] addr;
  logic [W-1:0] entry;
  logic         half;
  int checks = 0, failures = 0;

  exp_table dut (.addr, .entry, .half);

  initial begin
    for (int i = 0; i < 128; i++) begin
      real want, got;
      logic want_half;
      addr = P'(i);
      #1;
      want      = $exp(real'(i) / 128.0);
      want_half = (real'(i) / 128.0) >= 0.6931471805599453;
      if (want_half) want = want / 2.0;
      got = real'(entry) / (2.0 ** 63);
      checks++;
      if (half !== want_half || ((got - want) > 4.0e-16) || ((want - got) > 4.0e-16)) begin
        failures++;
        $display("FAIL entry %0d = %h (%0.17f) half %b, want %0.17f half %b", i, entry, got,
                 half, want, want_half);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
