// iscas_pkg: bit-level helpers shared by the adders.
//
// xor3 is the sum bit of a full adder and carry3 its carry (majority of the
// three inputs).  adder_ripple chains them into a ripple-carry adder, and
// adder_cs builds its carry-select groups from adder_ripple.  Both functions
// are purely combinational.  Putting the full-adder equations in a package
// follows the original design; the function name carry3 is this design's.
package iscas_pkg;

  // Sum bit of a full adder.
  function automatic logic xor3(input logic a, input logic b, input logic c);
    return a ^ b ^ c;
  endfunction

  // Carry bit of a full adder: (a and b) or (c and (a or b)).
  function automatic logic carry3(input logic a, input logic b, input logic c);
    return (a & b) | (c & (a | b));
  endfunction

endpackage
