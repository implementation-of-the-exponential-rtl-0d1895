// Test of the radix-4 Booth multiplier array at its full 64-bit width.
//
// Adds the carry-save outputs and compares with the product computed by
// the simulator for corner operands (0, 1, all ones, top bit set, alternating
// patterns) and random operands.
module tb_booth_multiplier;
  localparam int unsigned WIDTH = 64;
  logic [WIDTH-1:0]   a, b;
  logic [2*WIDTH-1:0] s, c, got, want;
  int checks = 0, failures = 0;

  booth_multiplier dut (.a, .b, .sum(s), .carry(c));

  task automatic check();
    #1;
    got  = s + c;
    want = {64'h0, a} * {64'h0, b};
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h, want %h", a, b, got, want);
    end
  endtask

  logic [63:0] corner [6] = '{64'h0, 64'h1, 64'hFFFF_FFFF_FFFF_FFFF, 64'h8000_0000_0000_0000,
                              64'hAAAA_AAAA_AAAA_AAAA, 64'h5555_5555_5555_5555};

  initial begin
    foreach (corner[i]) foreach (corner[j]) begin a = corner[i]; b = corner[j]; check(); end
    for (int i = 0; i < 3000; i++) begin
      a = {$urandom(), $urandom()};
      b = {$urandom(), $urandom()};
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
