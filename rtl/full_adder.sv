// full_adder: one-bit full adder, the stage of the ripple-carry adder4.
// sum = a xor b xor cin; cout = majority(a, b, cin). Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  assign sum  = a ^ b ^ cin;
  assign cout = (a & b) | (cin & (a ^ b));

endmodule
