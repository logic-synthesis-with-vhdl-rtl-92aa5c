// bj_pkg: types and constants shared by the BlackJack dealer's control and
// datapath.
//
// The state and mux-select codes are those of the original design: states
// get 00, add 01, test 10, use 11; operand selects +10 = 00, card = 01,
// -10 = 10.  The score is 5 bits and the card 4 bits, also as in the
// original.  An ace is the card value 1.
package bj_pkg;

  localparam int unsigned SCORE_W = 5;
  localparam int unsigned CARD_W  = 4;

  typedef enum logic [1:0] {
    ST_GET  = 2'b00,   // wait for a card (assert hit)
    ST_ADD  = 2'b01,   // add the card to the score
    ST_TEST = 2'b10,   // decide: draw again, stand, broke or drop an ace to 1
    ST_USE  = 2'b11    // count the ace as 11 (add 10 more)
  } bj_state_t;

  typedef enum logic [1:0] {
    SEL_PLUS10  = 2'b00,
    SEL_CARD    = 2'b01,
    SEL_MINUS10 = 2'b10
  } bj_sel_t;

  localparam logic [SCORE_W-1:0] PLUS10     = 5'b01010;  //  10
  localparam logic [SCORE_W-1:0] MINUS10    = 5'b10110;  // -10, two's complement
  localparam logic [CARD_W-1:0]  ACE        = 4'b0001;
  localparam logic [SCORE_W-1:0] STAND_OVER = 5'd16;     // stand when score > 16
  localparam logic [SCORE_W-1:0] BROKE_OVER = 5'd21;     // broke when score > 21

endpackage
