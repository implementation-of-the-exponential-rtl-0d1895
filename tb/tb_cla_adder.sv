// Test of the 128-bit carry-lookahead adder: corner and random operands,
// with and without carry-in, compared with the simulator's addition.
module tb_cla_adder;
  localparam int unsigned WIDTH = 128;
  logic [WIDTH-1:0] a, b, s;
  logic             cin, cout;
  logic [WIDTH:0]   want;
  int checks = 0, failures = 0;

  cla_adder dut (.a, .b, .cin, .s, .cout);

  task automatic check();
    #1;
    want = {1'b0, a} + {1'b0, b} + (WIDTH+1)'(cin);
    checks++;
    if ({cout, s} !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h + %b = %h, want %h", a, b, cin, {cout, s}, want);
    end
  endtask

  initial begin
    a = '1; b = '0; cin = 1; check();          // carry through every bit
    a = '1; b = '1; cin = 1; check();
    a = '0; b = '0; cin = 0; check();
    a = {1'b1, 127'h0}; b = {1'b1, 127'h0}; cin = 0; check();
    for (int i = 0; i < 5000; i++) begin
      a   = {$urandom(), $urandom(), $urandom(), $urandom()};
      b   = (i % 3 == 0) ? ~a : {$urandom(), $urandom(), $urandom(), $urandom()};
      cin = 1'($urandom());
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
