// bec: W-bit Binary to Excess-1 Converter.
//
// Adds one to x with an AND chain and one XOR per bit instead of a second
// ripple carry adder: y[0] = ~x[0], y[i] = x[i] ^ (x[0] & ... & x[i-1]).
// In the carry select adder it turns the carry-in-0 result of a group
// ({cout, sum}) into the carry-in-1 result, which is why it is one bit wider
// than the group's RCA. Wraps to 0 on all-ones input (never reached there,
// since an RCA result is at most 2^W - 2). The gate structure is the usual one
// for this converter; the widths (3 to 6 bits) follow the adder's groups.
// Combinational.
module bec #(
  parameter int unsigned W = 3  // 3, 4, 5 and 6 in the 16-bit adder
) (
  input  logic [W-1:0] x,
  output logic [W-1:0] y
);
  logic [W-1:0] all1;  // all1[i] = &x[i-1:0] (1 for i = 0)

  assign all1[0] = 1'b1;
  for (genvar i = 1; i < W; i++) begin : g_and
    assign all1[i] = all1[i-1] & x[i-1];
  end

  assign y = x ^ all1;
endmodule
