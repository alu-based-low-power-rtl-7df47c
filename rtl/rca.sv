// rca: W-bit ripple carry adder.
//
// A chain of W full adders; the carry ripples from bit 0 to bit W-1, so the
// delay grows linearly with W. In the carry select adder each group has one of
// these with its carry in tied to 0 (the lowest group takes the adder's carry
// in). Combinational; sum and cout are valid one ripple delay after a, b, cin.
module rca #(
  parameter int unsigned W = 2  // group width; the CSLA uses 2, 2, 3, 4 and 5
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;
  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_fa
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[W];
endmodule
