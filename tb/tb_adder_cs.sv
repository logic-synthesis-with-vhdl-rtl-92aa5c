// tb_adder_cs: checks the 16-bit carry-select adder (groups 4, 5, 7) against
// the simulator's own addition.  Directed cases make a carry leave each group
// boundary (bits 3->4 and 8->9) and make it stop there; random operands
// cover the rest.  It counts how often each upper group took its
// carry-in-1 sum and its carry-in-0 sum and fails if either never happened.
module tb_adder_cs;
  localparam int unsigned N = 16;

  logic [N-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;
  int sel_one [3] = '{0, 0, 0};
  int sel_zero[3] = '{0, 0, 0};

  adder_cs dut (.a, .b, .cin, .sum, .cout);

  task automatic check(input logic [N-1:0] ta, input logic [N-1:0] tb_, input logic tc);
    logic [N:0] expect_v;
    logic [4:0] low5;
    logic [9:0] low10;
    a = ta; b = tb_; cin = tc;
    #1;
    expect_v = {1'b0, ta} + {1'b0, tb_} + (N+1)'(tc);
    // carry into bit 4 and into bit 9, worked out from the operands alone
    low5  = {1'b0, ta[3:0]} + {1'b0, tb_[3:0]} + 5'(tc);
    low10 = {1'b0, ta[8:0]} + {1'b0, tb_[8:0]} + 10'(tc);
    if (low5[4])  sel_one[1]++; else sel_zero[1]++;
    if (low10[9]) sel_one[2]++; else sel_zero[2]++;
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
    check('1, '0, 1);                 // carry through all three groups
    check(16'h000f, 16'h0001, 0);     // carry out of group 0 only
    check(16'h01f0, 16'h0010, 0);     // carry out of group 1 only
    check(16'h01ff, 16'h0001, 0);     // carry from group 0 through group 1
    check(16'hfe00, 16'h0200, 0);     // carry out of group 2 (cout)
    check(16'h000f, 16'h0000, 1);     // carry in ripples to group 1
    for (int i = 0; i < 3000; i++) check(N'($urandom), N'($urandom), 1'($urandom));
    for (int g = 1; g < 3; g++) begin
      checks++;
      if (sel_one[g] == 0 || sel_zero[g] == 0) begin
        failures++;
        $display("FAIL group %0d select not exercised both ways", g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
