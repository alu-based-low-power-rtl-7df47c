// full_adder: one-bit full adder, the cell the ripple carry adders are chained from.
//
// sum = a ^ b ^ cin, cout = a&b | cin&(a^b). Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic p;
  assign p    = a ^ b;
  assign sum  = p ^ cin;
  assign cout = (a & b) | (cin & p);
endmodule
