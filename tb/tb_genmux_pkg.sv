// tb_genmux_pkg: checks every function of the multiplexer package, the 2:1,
// 3:1 and 4:1 versions for single bits and for 32-bit words, against an
// indexed table of the inputs.  Select 11 of the 3:1 versions must give the
// third input.
module tb_genmux_pkg;
  import genmux_pkg::*;

  int checks = 0, failures = 0;

  task automatic expect_eq(input string what, input mux_word_t got, input mux_word_t want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h, expected %h", what, got, want);
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
    mux_word_t w [4];
    logic      bits [4];
    logic [1:0] s;
    for (int i = 0; i < 500; i++) begin
      foreach (w[n]) begin w[n] = $urandom; bits[n] = 1'($urandom); end
      s = 2'($urandom);
      if (i < 4) s = 2'(i);
      expect_eq("mux2_bit", mux_word_t'(mux2_bit(bits[0], bits[1], s[0])), mux_word_t'(bits[s[0]]));
      expect_eq("mux2_vec", mux2_vec(w[0], w[1], s[0]), w[s[0]]);
      expect_eq("mux3_bit", mux_word_t'(mux3_bit(bits[0], bits[1], bits[2], s)),
                mux_word_t'(bits[(s == 2'b11) ? 2 : s]));
      expect_eq("mux3_vec", mux3_vec(w[0], w[1], w[2], s), w[(s == 2'b11) ? 2 : s]);
      expect_eq("mux4_bit", mux_word_t'(mux4_bit(bits[0], bits[1], bits[2], bits[3], s)),
                mux_word_t'(bits[s]));
      expect_eq("mux4_vec", mux4_vec(w[0], w[1], w[2], w[3], s), w[s]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
