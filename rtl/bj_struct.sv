// bj_struct: the BlackJack dealer, controller and datapath wired together.
//
// The dealer asserts hit while it wants a card.  The player sets the card
// value (1 = ace, 2..10) on card and presses card_rdy.  The dealer adds the
// card, counting one ace as 11 while that does not take the score over 21,
// and stops drawing at 17 or more: stand if the score is 17..21, broke if it
// is over 21.  The next press after stand or broke starts a new game with that
// card.  score shows the running total.
//
// Timing: the card must be stable from the press until the score has taken
// it, three clock edges after card_rdy is first sampled high.  A USE or a
// -10 step adds one cycle each, and TEST one more, before hit returns.
//
// The two blocks and every net between them follow the original design's
// structural description.
module bj_struct
  import bj_pkg::*;
(
  input  logic               reset_b,
  input  logic               clk,
  input  logic               card_rdy,
  input  logic [CARD_W-1:0]  card,
  output logic               stand,
  output logic               broke,
  output logic               hit,
  output logic [SCORE_W-1:0] score
);

  logic       load_net, clear_net, acecard_net;
  logic [1:0] sel_net;
  logic       s21gt_net, s16gt_net;

  bjcontrol c1 (
    .clk           (clk),
    .reset_b       (reset_b),
    .card_rdy      (card_rdy),
    .acecard       (acecard_net),
    .score16gt     (s16gt_net),
    .score21gt     (s21gt_net),
    .hit           (hit),
    .broke         (broke),
    .stand         (stand),
    .sel           (sel_net),
    .score_clear_b (clear_net),
    .score_load    (load_net)
  );

  bjdpath c2 (
    .clk       (clk),
    .reset_b   (reset_b),
    .load      (load_net),
    .clear_b   (clear_net),
    .sel       (sel_net),
    .card      (card),
    .acecard   (acecard_net),
    .score16gt (s16gt_net),
    .score21gt (s21gt_net),
    .score     (score)
  );

endmodule
