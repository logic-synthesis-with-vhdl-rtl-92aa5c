// tb_adder_ripple: checks the 16-bit ripple-carry adder against the
// simulator's own addition, on corner cases (all carries, no carries,
// carry in) and random operands.
module tb_adder_ripple;
  localparam int unsigned N = 16;

  logic [N-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;

  adder_ripple dut (.a, .b, .cin, .sum, .cout);

  task automatic check(input logic [N-1:0] ta, input logic [N-1:0] tb_, input logic tc);
    logic [N:0] expect_v;
    a = ta; b = tb_; cin = tc;
    #1;
    expect_v = {1'b0, ta} + {1'b0, tb_} + (N+1)'(tc);
    checks++;
    if ({cout, sum} !== expect_v) begin
      failures++;
      $display("FAIL %h + %h + %b: got %b_%h, expected %h", ta, tb_, tc, cout, sum, expect_v);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0, '0, 0);
    check('0, '0, 1);
    check('1, '0, 1);           // carry ripples through every bit
    check('1, '1, 1);
    check(16'h8000, 16'h8000, 0);
    check(16'h5555, 16'haaaa, 0);
    check(16'h5555, 16'haaaa, 1);
    for (int i = 0; i < 2000; i++) check(N'($urandom), N'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
