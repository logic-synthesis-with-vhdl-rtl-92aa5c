// genmux_pkg: a family of multiplexer functions, 2:1, 3:1 and 4:1, each for a
// single bit and for a bit vector.
//
// The original design overloads one function name, mux, and lets the
// compiler pick the version from the argument types.  SystemVerilog has no
// overloading, so each version has its own name: muxN_bit for one bit and
// muxN_vec for vectors.  The vector versions take and return a MUX_MAXW-bit
// word; a caller with narrower data zero-extends the inputs and keeps the low
// bits of the result.  Select coding follows the original: for the 3:1 and
// 4:1 versions sel 00 picks a, 01 picks b, 10 picks c, and for the 4:1
// version 11 picks d.  The original leaves the 3:1 output as don't-care for
// sel 11; here it returns c, this design's choice.  All functions are
// combinational.
package genmux_pkg;

  localparam int unsigned MUX_MAXW = 32;
  typedef logic [MUX_MAXW-1:0] mux_word_t;

  function automatic logic mux2_bit(input logic a, input logic b, input logic sel);
    return sel ? b : a;
  endfunction

  function automatic mux_word_t mux2_vec(input mux_word_t a, input mux_word_t b,
                                         input logic sel);
    return sel ? b : a;
  endfunction

  function automatic logic mux3_bit(input logic a, input logic b, input logic c,
                                    input logic [1:0] sel);
    unique case (sel)
      2'b00:   return a;
      2'b01:   return b;
      default: return c;   // 10, and 11 (don't-care in the original)
    endcase
  endfunction

  function automatic mux_word_t mux3_vec(input mux_word_t a, input mux_word_t b,
                                         input mux_word_t c, input logic [1:0] sel);
    unique case (sel)
      2'b00:   return a;
      2'b01:   return b;
      default: return c;   // 10, and 11 (don't-care in the original)
    endcase
  endfunction

  function automatic logic mux4_bit(input logic a, input logic b, input logic c,
                                    input logic d, input logic [1:0] sel);
    unique case (sel)
      2'b00:   return a;
      2'b01:   return b;
      2'b10:   return c;
      default: return d;
    endcase
  endfunction

  function automatic mux_word_t mux4_vec(input mux_word_t a, input mux_word_t b,
                                         input mux_word_t c, input mux_word_t d,
                                         input logic [1:0] sel);
    unique case (sel)
      2'b00:   return a;
      2'b01:   return b;
      2'b10:   return c;
      default: return d;
    endcase
  endfunction

endpackage
