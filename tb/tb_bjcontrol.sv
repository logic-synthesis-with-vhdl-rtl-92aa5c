// tb_bjcontrol: tests the dealer controller on its own.
//
// A few lines of behavioural score register stand in for the datapath: they
// add 10, -10 or the card as the controller's sel and score_load ask, clear
// on score_clear_b, and report ace and the two thresholds.  The testbench
// checks the controller's per-state outputs directly (hit while waiting, no
// second add while the button is held, the +10 step for a first ace, the
// -10 step when an ace must count 1) and plays random games against the
// rules model in bj_ref_pkg.
module tb_bjcontrol;
  import bj_ref_pkg::*;

  logic       clk = 0, reset_b = 0, card_rdy = 0;
  logic [3:0] card = '0;
  logic       acecard, score16gt, score21gt;
  logic       hit, broke, stand, score_clear_b, score_load;
  logic [1:0] sel;
  int         score_m;
  int checks = 0, failures = 0;
  int loads_in_hold;
  hand_t hand;

  bjcontrol dut (.clk, .reset_b, .card_rdy, .acecard, .score16gt, .score21gt,
                 .hit, .broke, .stand, .sel, .score_clear_b, .score_load);

  always #5 clk = ~clk;

  // Behavioural datapath.
  assign acecard   = (card == 4'd1);
  assign score16gt = score_m > 16;
  assign score21gt = score_m > 21;
  always @(posedge clk or negedge reset_b) begin
    if (!reset_b)          score_m <= 0;
    else if (!score_clear_b) score_m <= 0;
    else if (score_load)
      case (sel)
        2'b00:   score_m <= (score_m + 10) & 31;
        2'b10:   score_m <= (score_m - 10) & 31;
        default: score_m <= (score_m + int'(card)) & 31;
      endcase
  end

  task automatic expect_eq(input string what, input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d, expected %0d (t=%0t)", what, got, want, $time);
    end
  endtask

  task automatic play(input int unsigned cv, input int unsigned hold);
    int unsigned waited;
    @(negedge clk);
    card     = 4'(cv);
    card_rdy = 1;
    repeat (hold) @(negedge clk);
    card_rdy = 0;
    waited = 0;
    while (!hit && waited < 40) begin
      @(posedge clk); #1;
      waited++;
    end
    expect_eq("hit returns", int'(hit), 1);
    hand = deal(hand, cv);
    expect_eq("score", score_m, value(hand));
    expect_eq("stand", int'(stand), int'(is_stand(hand)));
    expect_eq("broke", int'(broke), int'(is_broke(hand)));
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count score loads while the button is held down (a held button adds once).
  always @(posedge clk) if (card_rdy && score_load && sel == 2'b01) loads_in_hold++;

  initial begin
    hand = new_hand();
    repeat (2) @(posedge clk);
    @(negedge clk) reset_b = 1;
    #1 expect_eq("hit while waiting", int'(hit), 1);
    expect_eq("no load while waiting", int'(score_load), 0);

    // Directed: an ace held for 10 cycles.  Edge 1 syncs, edge 2 enters ADD,
    // and during ADD the controller loads the card; then USE loads +10.
    @(negedge clk) card = 4'd1; card_rdy = 1;
    @(negedge clk) expect_eq("hit drops once the press is seen", int'(hit), 0);
    expect_eq("no load in GET", int'(score_load), 0);
    @(negedge clk) expect_eq("ADD loads", int'(score_load), 1);
    expect_eq("ADD selects card", int'(sel), 1);
    @(negedge clk) expect_eq("USE loads", int'(score_load), 1);
    expect_eq("USE selects +10", int'(sel), 0);
    loads_in_hold = 0;
    repeat (8) @(negedge clk);
    expect_eq("held button adds no second card", loads_in_hold, 0);
    expect_eq("no hit while held", int'(hit), 0);
    card_rdy = 0;
    repeat (2) @(negedge clk);
    expect_eq("hit after release", int'(hit), 1);
    hand = deal(hand, 1);
    expect_eq("ace counted 11", score_m, 11);

    // 11 + 9 = 20 stands; next game: ace, 5, 9 -> soft 25 drops to 15.
    play(9, 1);
    expect_eq("stand at 20", int'(stand), 1);
    play(1, 1);  expect_eq("new game with ace", score_m, 11);
    play(5, 1);  expect_eq("soft 16", score_m, 16);
    play(9, 1);  expect_eq("ace counted 1", score_m, 15);
    expect_eq("no stand at 15", int'(stand), 0);
    play(10, 1); expect_eq("broke at 25", int'(broke), 1);

    for (int i = 0; i < 300; i++) play(1 + $urandom % 10, 1 + $urandom % 4);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
