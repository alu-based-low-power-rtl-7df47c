// clock_gate: latch-free clock gate.
//
// gclk = clk & en. There is no latch or flip-flop inside, so the cell is a
// single AND gate; the price is that en must not change while clk is high,
// or gclk would get a short pulse or lose part of one. In the ALU, en comes
// from flip-flops clocked on the falling edge (op_decoder), which meets that
// rule by construction. With en low the gated clock stays low and the
// registers behind it neither load nor switch.
//
// The AND-gate form follows the latch-free gating the design is built on;
// producing the enable on the falling edge is this design's own choice.
module clock_gate (
  input  logic clk,
  input  logic en,    // stable while clk is high
  output logic gclk
);
  assign gclk = clk & en;

endmodule
