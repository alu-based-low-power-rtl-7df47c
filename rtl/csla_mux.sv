// csla_mux: 2:1 multiplexer of one carry select adder group.
//
// Picks between the group's carry-in-0 result (from its RCA) and carry-in-1
// result (from its BEC) with the carry coming out of the group below.
// The 16-bit adder uses W = 3, 4, 5 and 6 ("6:3" to "12:6" multiplexers: 2W
// inputs, W outputs). Combinational.
module csla_mux #(
  parameter int unsigned W = 3
) (
  input  logic [W-1:0] d0,   // result for carry in 0
  input  logic [W-1:0] d1,   // result for carry in 1
  input  logic         s,    // carry from the group below
  output logic [W-1:0] y
);
  assign y = s ? d1 : d0;
endmodule
