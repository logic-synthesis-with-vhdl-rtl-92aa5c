// bj_ref_pkg: reference model of the dealer's hand for the testbenches.
//
// It is written from the rules of the game, not from the controller: the
// hand keeps its hard total (every ace counted 1) and whether it holds an
// ace.  Its value is hard + 10 when it holds an ace and that does not pass
// 21, otherwise hard.  The dealer stops drawing when the value passes 16:
// stand if the value is at most 21, broke otherwise.
package bj_ref_pkg;

  typedef struct {
    int unsigned hard;
    bit          has_ace;
    bit          over;     // game ended (stand or broke) with the last card
  } hand_t;

  function automatic hand_t new_hand();
    hand_t h;
    h.hard = 0; h.has_ace = 0; h.over = 0;
    return h;
  endfunction

  function automatic int unsigned value(input hand_t h);
    if (h.has_ace && h.hard + 10 <= 21) return h.hard + 10;
    return h.hard;
  endfunction

  function automatic bit is_stand(input hand_t h);
    return value(h) > 16 && value(h) <= 21;
  endfunction

  function automatic bit is_broke(input hand_t h);
    return value(h) > 21;
  endfunction

  // Deal one card; a card after stand or broke starts a new hand.
  function automatic hand_t deal(input hand_t h, input int unsigned card);
    hand_t n = h.over ? new_hand() : h;
    n.hard += card;
    if (card == 1) n.has_ace = 1;
    n.over = is_stand(n) || is_broke(n);
    return n;
  endfunction

endpackage
