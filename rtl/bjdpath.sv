// bjdpath: datapath of the BlackJack dealer.
//
// A 5-bit score register accumulates card values.  Each cycle the adder forms
// score + operand, where a 3-way mux picks the operand: the card (zero-extended
// to 5 bits), +10 (to count an ace as 11) or -10 (to take that back).  The
// register loads the adder output when load is high and clears to zero when
// clear_b is low; the clear wins.  The ace finder flags card == 1 and two
// comparators flag score > 16 and score > 21 for the controller.
//
// Interface: sel 00 adds +10, 10 adds -10, any other code (01 in use) adds
// the card.  acecard depends only on card; score16gt and score21gt depend only
// on the registered score, so all three are stable through a cycle.
//
// Timing: one register stage.  load/clear_b/sel act at the next rising edge;
// reset_b is asynchronous and active low.
//
// The structure, the codes and the ripple-carry adder (carry in 0, carry out
// of the top bit dropped) follow the original design.  The adder bits use the
// shared full-adder functions of iscas_pkg.
module bjdpath
  import bj_pkg::*;
(
  input  logic               clk,
  input  logic               reset_b,
  input  logic               load,
  input  logic               clear_b,
  input  logic [1:0]         sel,
  input  logic [CARD_W-1:0]  card,
  output logic               acecard,
  output logic               score16gt,
  output logic               score21gt,
  output logic [SCORE_W-1:0] score
);

  logic [SCORE_W-1:0] score_q, score_d, mux_out, adder_out;
  logic [SCORE_W:0]   c;

  // Score register.
  always_ff @(posedge clk or negedge reset_b) begin
    if (!reset_b) score_q <= '0;
    else          score_q <= score_d;
  end

  always_comb begin
    if (!clear_b)  score_d = '0;
    else if (load) score_d = adder_out;
    else           score_d = score_q;
  end

  // Operand mux: +10, -10 or the card.
  always_comb begin
    unique case (sel)
      SEL_PLUS10:  mux_out = PLUS10;
      SEL_MINUS10: mux_out = MINUS10;
      default:     mux_out = {1'b0, card};
    endcase
  end

  // Ripple-carry adder, score + operand.
  assign c[0] = 1'b0;

  for (genvar i = 0; i < SCORE_W; i++) begin : g_bit
    assign adder_out[i] = iscas_pkg::xor3(score_q[i], mux_out[i], c[i]);
    assign c[i + 1]     = iscas_pkg::carry3(score_q[i], mux_out[i], c[i]);
  end

  // The carry out of the top bit is not part of the score.
  logic unused_carry;
  assign unused_carry = c[SCORE_W];

  assign acecard   = (card == ACE);
  assign score16gt = (score_q > STAND_OVER);
  assign score21gt = (score_q > BROKE_OVER);
  assign score     = score_q;

endmodule
