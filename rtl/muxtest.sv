// muxtest: two 3:1 multiplexers built from the shared genmux_pkg functions,
// one on single bits and one on 4-bit vectors.
//
// y picks a, b or c by s_a; z picks j, k or l by s_b.  Select coding: 00 the
// first input, 01 the second, 10 the third.  The original leaves select 11
// as don't-care; here it gives the third input (c or l), this design's
// choice made in genmux_pkg.  Purely combinational.  The ports follow the
// original design.
module muxtest (
  input  logic       a,
  input  logic       b,
  input  logic       c,
  input  logic [1:0] s_a,
  output logic       y,
  input  logic [3:0] j,
  input  logic [3:0] k,
  input  logic [3:0] l,
  input  logic [1:0] s_b,
  output logic [3:0] z
);

  genmux_pkg::mux_word_t z_word;

  assign y      = genmux_pkg::mux3_bit(a, b, c, s_a);
  assign z_word = genmux_pkg::mux3_vec(genmux_pkg::mux_word_t'(j),
                                       genmux_pkg::mux_word_t'(k),
                                       genmux_pkg::mux_word_t'(l), s_b);
  assign z      = z_word[3:0];

  // The upper bits of the shared mux word are zero and not used here.
  logic unused_upper;
  assign unused_upper = |z_word[genmux_pkg::MUX_MAXW-1:4];

endmodule
