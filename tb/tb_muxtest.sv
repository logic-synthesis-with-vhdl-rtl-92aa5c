// tb_muxtest: exhaustive check of the 1-bit 3:1 mux (all a, b, c, s_a) and
// random plus directed checks of the 4-bit 3:1 mux, against a table-driven
// expectation (select 00 -> first, 01 -> second, 10 and 11 -> third).
module tb_muxtest;
  logic       a, b, c, y;
  logic [1:0] s_a, s_b;
  logic [3:0] j, k, l, z;
  int checks = 0, failures = 0;

  muxtest dut (.a, .b, .c, .s_a, .y, .j, .k, .l, .s_b, .z);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] in3;
    logic [3:0] vin [3];
    logic       exp_y;
    logic [3:0] exp_z;
    j = '0; k = '0; l = '0; s_b = '0;
    for (int v = 0; v < 32; v++) begin
      {s_a, a, b, c} = 5'(v);
      in3 = {c, b, a};
      #1;
      exp_y = in3[(s_a == 2'b11) ? 2 : s_a];
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL y: a=%b b=%b c=%b s_a=%b got %b", a, b, c, s_a, y);
      end
    end
    for (int i = 0; i < 400; i++) begin
      vin[0] = 4'($urandom); vin[1] = 4'($urandom); vin[2] = 4'($urandom);
      if (i < 4) begin vin[0] = 4'h1; vin[1] = 4'h2; vin[2] = 4'h4; end
      j = vin[0]; k = vin[1]; l = vin[2];
      s_b = (i < 4) ? 2'(i) : 2'($urandom);
      #1;
      exp_z = vin[(s_b == 2'b11) ? 2 : s_b];
      checks++;
      if (z !== exp_z) begin
        failures++;
        $display("FAIL z: j=%h k=%h l=%h s_b=%b got %h", j, k, l, s_b, z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
