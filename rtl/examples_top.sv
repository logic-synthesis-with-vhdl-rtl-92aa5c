// examples_top: the three independent circuits of this collection, side by
// side, each with its own ports.
//
//   bj_*  the BlackJack dealer (bj_struct), a clocked controller plus datapath
//   rc_*  an ADD_W-bit (default 16) ripple-carry adder (adder_ripple)
//   cs_*  a 16-bit carry-select adder in groups of 4, 5 and 7 (adder_cs)
//   mx_*  a 1-bit and a 4-bit 3:1 multiplexer (muxtest)
//
// Nothing connects one circuit to another; the top exists so that the whole
// collection can be built and simulated as one design.  The adders and muxes
// are combinational; the dealer is clocked by bj_clk with asynchronous
// active-low reset bj_reset_b.
module examples_top
  import bj_pkg::*;
#(
  parameter int unsigned ADD_W = 16   // ripple-carry adder width
) (
  // BlackJack dealer
  input  logic               bj_clk,
  input  logic               bj_reset_b,
  input  logic               bj_card_rdy,
  input  logic [CARD_W-1:0]  bj_card,
  output logic               bj_hit,
  output logic               bj_stand,
  output logic               bj_broke,
  output logic [SCORE_W-1:0] bj_score,
  // ripple-carry adder
  input  logic [ADD_W-1:0]   rc_a,
  input  logic [ADD_W-1:0]   rc_b,
  input  logic               rc_cin,
  output logic [ADD_W-1:0]   rc_sum,
  output logic               rc_cout,
  // carry-select adder
  input  logic [15:0]        cs_a,
  input  logic [15:0]        cs_b,
  input  logic               cs_cin,
  output logic [15:0]        cs_sum,
  output logic               cs_cout,
  // multiplexers
  input  logic               mx_a,
  input  logic               mx_b,
  input  logic               mx_c,
  input  logic [1:0]         mx_s_a,
  output logic               mx_y,
  input  logic [3:0]         mx_j,
  input  logic [3:0]         mx_k,
  input  logic [3:0]         mx_l,
  input  logic [1:0]         mx_s_b,
  output logic [3:0]         mx_z
);

  bj_struct u_dealer (
    .reset_b  (bj_reset_b),
    .clk      (bj_clk),
    .card_rdy (bj_card_rdy),
    .card     (bj_card),
    .stand    (bj_stand),
    .broke    (bj_broke),
    .hit      (bj_hit),
    .score    (bj_score)
  );

  adder_ripple #(.N(ADD_W)) u_rc (
    .a    (rc_a),
    .b    (rc_b),
    .cin  (rc_cin),
    .sum  (rc_sum),
    .cout (rc_cout)
  );

  adder_cs u_cs (
    .a    (cs_a),
    .b    (cs_b),
    .cin  (cs_cin),
    .sum  (cs_sum),
    .cout (cs_cout)
  );

  muxtest u_mux (
    .a   (mx_a),
    .b   (mx_b),
    .c   (mx_c),
    .s_a (mx_s_a),
    .y   (mx_y),
    .j   (mx_j),
    .k   (mx_k),
    .l   (mx_l),
    .s_b (mx_s_b),
    .z   (mx_z)
  );

endmodule
