// bjcontrol: controller of the BlackJack dealer.
//
// A four-state machine plays the dealer's hand one card at a time:
//   GET  - assert hit and wait for the card-ready button.  On its rising edge
//          clear stand and broke; if the previous game had ended (stand or
//          broke was set) also clear the score and the ace flag.  Go to ADD.
//   ADD  - add the card to the score.  A first ace goes to USE, anything else
//          to TEST.
//   USE  - add 10 more so the ace counts 11; set the ace11 flag; go to TEST.
//   TEST - score <= 16: back to GET for another card.  17..21: set stand.
//          Over 21 with no ace counted as 11: set broke.  Over 21 with an ace
//          counted as 11: subtract 10, clear the flag and test again.
// The card_rdy button is asynchronous: two flip-flops in series give
// card_rdy_sync and card_rdy_dly, and "sync high, dly low" marks a press,
// so a held button adds its card once.
//
// Interface: sel, score_load and score_clear_b drive bjdpath; acecard,
// score16gt and score21gt come back from it.  stand and broke are registered
// flags; hit is combinational from the state and card_rdy_sync.
//
// Timing: a press seen at clock edge 1 (sync high) moves GET -> ADD at edge 2,
// and the score takes the card at edge 3.  reset_b is asynchronous.
//
// States, codes, the flag flip-flops and the order of the tests follow the
// original design.  The original resets only the state register; here reset
// also clears the flags and the button flip-flops, this design's choice.
// The assertion below samples reset_b on the clock to disable itself during
// reset; lint tools report reset_b as used both synchronously and
// asynchronously because of it, which is expected and harmless.
module bjcontrol
  import bj_pkg::*;
(
  input  logic       clk,
  input  logic       reset_b,
  input  logic       card_rdy,
  input  logic       acecard,
  input  logic       score16gt,
  input  logic       score21gt,
  output logic       hit,
  output logic       broke,
  output logic       stand,
  output logic [1:0] sel,
  output logic       score_clear_b,
  output logic       score_load
);

  bj_state_t p_state, n_state;
  logic ace11_q, ace11_d;
  logic broke_q, broke_d;
  logic stand_q, stand_d;
  logic card_rdy_sync, card_rdy_dly;
  bj_sel_t sel_e;

  always_ff @(posedge clk or negedge reset_b) begin
    if (!reset_b) begin
      p_state       <= ST_GET;
      ace11_q       <= 1'b0;
      broke_q       <= 1'b0;
      stand_q       <= 1'b0;
      card_rdy_sync <= 1'b0;
      card_rdy_dly  <= 1'b0;
    end else begin
      p_state       <= n_state;
      ace11_q       <= ace11_d;
      broke_q       <= broke_d;
      stand_q       <= stand_d;
      card_rdy_sync <= card_rdy;
      card_rdy_dly  <= card_rdy_sync;
    end
  end

  always_comb begin
    sel_e         = SEL_PLUS10;
    score_load    = 1'b0;
    score_clear_b = 1'b1;
    hit           = 1'b0;
    n_state       = p_state;
    ace11_d       = ace11_q;
    stand_d       = stand_q;
    broke_d       = broke_q;

    unique case (p_state)
      ST_GET: begin
        if (!card_rdy_sync) begin
          hit = 1'b1;
        end else if (!card_rdy_dly) begin
          stand_d = 1'b0;
          broke_d = 1'b0;
          if (stand_q || broke_q) begin   // previous game over: start afresh
            score_clear_b = 1'b0;
            ace11_d       = 1'b0;
          end
          n_state = ST_ADD;
        end
      end

      ST_ADD: begin
        sel_e      = SEL_CARD;
        score_load = 1'b1;
        if (acecard && !ace11_q) n_state = ST_USE;
        else                     n_state = ST_TEST;
      end

      ST_USE: begin
        sel_e      = SEL_PLUS10;
        score_load = 1'b1;
        ace11_d    = 1'b1;
        n_state    = ST_TEST;
      end

      ST_TEST: begin
        if (!score16gt) begin
          n_state = ST_GET;
        end else if (!score21gt) begin
          stand_d = 1'b1;
          n_state = ST_GET;
        end else if (!ace11_q) begin
          broke_d = 1'b1;
          n_state = ST_GET;
        end else begin                     // count the ace as 1 and re-test
          sel_e      = SEL_MINUS10;
          score_load = 1'b1;
          ace11_d    = 1'b0;
        end
      end

      default: n_state = p_state;
    endcase
  end

  assign sel   = sel_e;
  assign broke = broke_q;
  assign stand = stand_q;

  // A score load never coincides with a score clear.
  ap_load_xor_clear: assert property (@(posedge clk) disable iff (!reset_b)
                                      !(score_load && !score_clear_b));

endmodule
