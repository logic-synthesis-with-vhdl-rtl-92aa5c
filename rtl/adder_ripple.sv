// adder_ripple: N-bit ripple-carry adder, sum = a + b + cin.
//
// Bit i adds a[i], b[i] and the carry from bit i-1 with the full-adder
// functions of iscas_pkg; the carry out of the top bit is cout.  Purely
// combinational, with a delay that grows linearly with N.  The structure and
// the default width of 16 follow the original design.
module adder_ripple #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  logic [N:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_bit
    assign sum[i]   = iscas_pkg::xor3(a[i], b[i], c[i]);
    assign c[i + 1] = iscas_pkg::carry3(a[i], b[i], c[i]);
  end

  assign cout = c[N];

endmodule
