// tb_examples_top: end-to-end test of the whole collection at its default
// sizes (16-bit adders, 5-bit dealer score).
//
// The dealer plays random games against the rules model in bj_ref_pkg while,
// on the same clock, both adders and both multiplexers get random operands
// and are compared with the simulator's own arithmetic and a table.  The
// testbench counts each mechanism of the designs and fails if one never
// happened: hit, stand, broke, a new game clearing the score, an ace counted
// 11 (USE state), an ace taken back to 1 (-10 step), a held button waited
// out, each carry-select group picking both its carry-in-0 and carry-in-1
// sums, and every select code of both multiplexers.
module tb_examples_top;
  import bj_ref_pkg::*;
  import bj_pkg::*;

  localparam int unsigned W = 16;

  logic        clk = 0, reset_b = 0, card_rdy = 0;
  logic [3:0]  card = '0;
  logic        hit, stand, broke;
  logic [4:0]  score;
  logic [W-1:0] rc_a = '0, rc_b = '0, cs_a = '0, cs_b = '0, rc_sum, cs_sum;
  logic        rc_cin = 0, cs_cin = 0, rc_cout, cs_cout;
  logic        mx_a = 0, mx_b = 0, mx_c = 0, mx_y;
  logic [1:0]  mx_s_a = '0, mx_s_b = '0;
  logic [3:0]  mx_j = '0, mx_k = '0, mx_l = '0, mx_z;

  int checks = 0, failures = 0;
  hand_t hand;

  examples_top dut (
    .bj_clk(clk), .bj_reset_b(reset_b), .bj_card_rdy(card_rdy), .bj_card(card),
    .bj_hit(hit), .bj_stand(stand), .bj_broke(broke), .bj_score(score),
    .rc_a, .rc_b, .rc_cin, .rc_sum, .rc_cout,
    .cs_a, .cs_b, .cs_cin, .cs_sum, .cs_cout,
    .mx_a, .mx_b, .mx_c, .mx_s_a, .mx_y, .mx_j, .mx_k, .mx_l, .mx_s_b, .mx_z
  );

  always #5 clk = ~clk;

  // ---- mechanism counters -------------------------------------------------
  typedef enum int {
    M_HIT, M_STAND, M_BROKE, M_NEW_GAME, M_ACE_11, M_ACE_1, M_HELD,
    M_CS1_ZERO, M_CS1_ONE, M_CS2_ZERO, M_CS2_ONE,
    M_MUXA_00, M_MUXA_01, M_MUXA_10, M_MUXA_11,
    M_MUXB_00, M_MUXB_01, M_MUXB_10, M_MUXB_11, M_COUNT
  } mech_e;
  int seen [M_COUNT];

  always @(posedge clk) if (reset_b) begin
    if (hit)   seen[M_HIT]++;
    if (dut.u_dealer.c1.p_state == ST_TEST && dut.u_dealer.c1.n_state == ST_GET &&
        dut.u_dealer.c1.stand_d && !dut.u_dealer.c1.stand_q) seen[M_STAND]++;
    if (dut.u_dealer.c1.p_state == ST_TEST && dut.u_dealer.c1.broke_d &&
        !dut.u_dealer.c1.broke_q) seen[M_BROKE]++;
    if (!dut.u_dealer.clear_net) seen[M_NEW_GAME]++;
    if (dut.u_dealer.c1.p_state == ST_USE) seen[M_ACE_11]++;
    if (dut.u_dealer.load_net && dut.u_dealer.sel_net == SEL_MINUS10) seen[M_ACE_1]++;
    if (dut.u_dealer.c1.p_state == ST_GET && dut.u_dealer.c1.card_rdy_sync &&
        dut.u_dealer.c1.card_rdy_dly) seen[M_HELD]++;
  end

  task automatic expect_eq(input string what, input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d, expected %0d (t=%0t)", what, got, want, $time);
    end
  endtask

  // ---- combinational circuits, checked every clock -------------------------
  task automatic check_comb();
    logic [W:0] want;
    logic [4:0] low5;
    logic [9:0] low10;
    logic [2:0] in3;
    logic [3:0] vin [3];
    rc_a = W'($urandom); rc_b = W'($urandom); rc_cin = 1'($urandom);
    cs_a = W'($urandom); cs_b = W'($urandom); cs_cin = 1'($urandom);
    if ($urandom % 8 == 0) begin cs_a = '1; cs_b = '0; cs_cin = 1; end
    {mx_a, mx_b, mx_c} = 3'($urandom);
    mx_s_a = 2'($urandom); mx_s_b = 2'($urandom);
    mx_j = 4'($urandom); mx_k = 4'($urandom); mx_l = 4'($urandom);
    #1;
    want = {1'b0, rc_a} + {1'b0, rc_b} + (W+1)'(rc_cin);
    expect_eq("ripple adder", int'({rc_cout, rc_sum}), int'(want));
    want = {1'b0, cs_a} + {1'b0, cs_b} + (W+1)'(cs_cin);
    expect_eq("carry-select adder", int'({cs_cout, cs_sum}), int'(want));
    low5  = {1'b0, cs_a[3:0]} + {1'b0, cs_b[3:0]} + 5'(cs_cin);
    low10 = {1'b0, cs_a[8:0]} + {1'b0, cs_b[8:0]} + 10'(cs_cin);
    seen[low5[4]  ? M_CS1_ONE : M_CS1_ZERO]++;
    seen[low10[9] ? M_CS2_ONE : M_CS2_ZERO]++;
    in3 = {mx_c, mx_b, mx_a};
    expect_eq("1-bit mux", int'(mx_y), int'(in3[(mx_s_a == 2'b11) ? 2 : mx_s_a]));
    vin[0] = mx_j; vin[1] = mx_k; vin[2] = mx_l;
    expect_eq("4-bit mux", int'(mx_z), int'(vin[(mx_s_b == 2'b11) ? 2 : mx_s_b]));
    seen[M_MUXA_00 + int'(mx_s_a)]++;
    seen[M_MUXB_00 + int'(mx_s_b)]++;
  endtask

  always @(negedge clk) if (reset_b) check_comb();

  // ---- dealer ---------------------------------------------------------------
  task automatic play(input int unsigned cv, input int unsigned hold);
    int unsigned base, waited;
    base = hand.over ? 0 : int'(score);
    @(negedge clk);
    card     = 4'(cv);
    card_rdy = 1;
    fork
      begin
        repeat (hold) @(negedge clk);
        card_rdy = 0;
      end
      begin
        repeat (3) @(posedge clk);
        #1 expect_eq("score three edges after the press", int'(score), int'((base + cv) & 31));
      end
    join
    waited = 0;
    while (!hit && waited < 40) begin
      @(posedge clk); #1;
      waited++;
    end
    expect_eq("hit returns", int'(hit), 1);
    hand = deal(hand, cv);
    expect_eq("score", int'(score), int'(value(hand)));
    expect_eq("stand", int'(stand), int'(is_stand(hand)));
    expect_eq("broke", int'(broke), int'(is_broke(hand)));
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mech_e m;
    foreach (seen[i]) seen[i] = 0;
    hand = new_hand();
    repeat (3) @(posedge clk);
    @(negedge clk) reset_b = 1;
    for (int i = 0; i < 500; i++) play(1 + $urandom % 10, 1 + $urandom % 5);
    m = m.first();
    for (int i = 0; i < M_COUNT; i++) begin
      checks++;
      $display("mechanism %-12s seen %0d times", m.name(), seen[m]);
      if (seen[m] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", m.name());
      end
      m = m.next();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
