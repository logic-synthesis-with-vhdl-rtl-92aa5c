// tb_bj_struct: plays the BlackJack dealer end to end.
//
// It first replays the two games of the reference waveforms (5, 8, 4 ending
// in stand at 17; ace, 2, 9, 10 ending in broke at 22, with the ace counted
// 11 and later 1), then random games with cards 1..10 and random button hold
// times.  After every card it compares score, stand and broke with the rules
// model in bj_ref_pkg, and it checks the latency: the score must hold
// previous + card exactly three clock edges after card_rdy is first sampled.
module tb_bj_struct;
  import bj_ref_pkg::*;

  logic       clk = 0, reset_b = 0, card_rdy = 0;
  logic [3:0] card = '0;
  logic       stand, broke, hit;
  logic [4:0] score;
  int checks = 0, failures = 0;
  hand_t hand;

  bj_struct dut (.reset_b, .clk, .card_rdy, .card, .stand, .broke, .hit, .score);

  always #5 clk = ~clk;

  task automatic expect_eq(input string what, input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d, expected %0d (t=%0t)", what, got, want, $time);
    end
  endtask

  // Press card_rdy for 'hold' cycles with 'value' on card, wait for the dealer
  // to ask again, and compare with the model.
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
        #1 expect_eq("score three edges after the press", score, (base + cv) & 31);
      end
    join
    waited = 0;
    while (!hit && waited < 40) begin
      @(posedge clk); #1;
      waited++;
    end
    expect_eq("hit returns", hit, 1);
    hand = deal(hand, cv);
    expect_eq("score", score, value(hand));
    expect_eq("stand", stand, is_stand(hand));
    expect_eq("broke", broke, is_broke(hand));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hand = new_hand();
    repeat (3) @(posedge clk);
    #1 expect_eq("hit after reset", hit, 1);
    expect_eq("score after reset", score, 0);
    @(negedge clk) reset_b = 1;
    repeat (2) @(posedge clk);

    // Game 1 of the reference waveforms.
    play(5, 4);  expect_eq("game 1 score", score, 5);
    play(8, 2);  expect_eq("game 1 score", score, 13);
    play(4, 2);  expect_eq("game 1 score", score, 17);
    expect_eq("game 1 stands", stand, 1);
    // Game 2: the stand of game 1 makes the first card start a new game.
    play(1, 2);  expect_eq("game 2 score", score, 11);
    expect_eq("stand cleared", stand, 0);
    play(2, 2);  expect_eq("game 2 score", score, 13);
    play(9, 2);  expect_eq("game 2 score", score, 12);
    play(10, 2); expect_eq("game 2 score", score, 22);
    expect_eq("game 2 broke", broke, 1);

    // Random games.
    for (int i = 0; i < 300; i++) play(1 + $urandom % 10, 1 + $urandom % 5);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
