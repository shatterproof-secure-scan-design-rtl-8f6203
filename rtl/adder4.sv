// adder4: W-bit ripple-carry adder (W = 4 by default), the example circuit
// under test that the secure scan chain is wrapped around.
//
// W one-bit full adders are chained through their carries:
// {cout, sum} = a + b + cin. Purely combinational. The design only names the
// circuit ("a 4-bit full adder"); the ripple-carry form is this
// implementation's choice as the simplest one.
module adder4 #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W:0] carry;
  assign carry[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (
      .a    (a[i]),
      .b    (b[i]),
      .cin  (carry[i]),
      .sum  (sum[i]),
      .cout (carry[i+1])
    );
  end

  assign cout = carry[W];

endmodule
