// adder_cs: carry-select adder, sum = a + b + cin, split into groups of
// GROUPS[0], GROUPS[1], ... bits counted from the least significant end.
//
// Group 0 is a single ripple-carry adder fed by cin.  Every later group has
// two ripple-carry adders working in parallel, one assuming carry in 0 and
// one assuming carry in 1; the carry out of the group below picks one of the
// two sums.  That group's own carry out is carry0 | (carry_below & carry1),
// so the carry passes through one AND-OR per group instead of rippling
// through every bit.  Purely combinational.
//
// The default of 16 bits in groups of 4, 5 and 7, and the carry-selection
// equations, follow the original design.  The group sizes must add up to N;
// elaboration stops with an error otherwise.
module adder_cs #(
  parameter int unsigned N                = 16,
  parameter int unsigned NGROUPS          = 3,
  parameter int unsigned GROUPS [NGROUPS] = '{4, 5, 7}
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  // Lowest bit index of group g.
  function automatic int unsigned group_low(input int unsigned g);
    int unsigned low = 0;
    for (int unsigned i = 0; i < g; i++) low += GROUPS[i];
    return low;
  endfunction

  if (group_low(NGROUPS) != N) begin : g_size_check
    $error("adder_cs: group sizes add up to %0d, not N = %0d", group_low(NGROUPS), N);
  end

  // carry_sel[g] is the true carry out of group g.
  logic [NGROUPS-1:0] carry_sel;

  for (genvar g = 0; g < NGROUPS; g++) begin : g_group
    localparam int unsigned LO = group_low(g);
    localparam int unsigned W  = GROUPS[g];

    if (g == 0) begin : g_first
      adder_ripple #(.N(W)) u_rc (
        .a    (a[LO +: W]),
        .b    (b[LO +: W]),
        .cin  (cin),
        .sum  (sum[LO +: W]),
        .cout (carry_sel[0])
      );
    end else begin : g_select
      logic [W-1:0] sum_zero, sum_one;
      logic         carry_zero, carry_one;

      adder_ripple #(.N(W)) u_rc0 (
        .a    (a[LO +: W]),
        .b    (b[LO +: W]),
        .cin  (1'b0),
        .sum  (sum_zero),
        .cout (carry_zero)
      );

      adder_ripple #(.N(W)) u_rc1 (
        .a    (a[LO +: W]),
        .b    (b[LO +: W]),
        .cin  (1'b1),
        .sum  (sum_one),
        .cout (carry_one)
      );

      assign sum[LO +: W]  = carry_sel[g-1] ? sum_one : sum_zero;
      assign carry_sel[g]  = (carry_sel[g-1] & carry_one) | carry_zero;
    end
  end

  assign cout = carry_sel[NGROUPS-1];

endmodule
