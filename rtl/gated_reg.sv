// gated_reg: result register on a gated clock.
//
// Loads d on the rising edge of its (gated) clock and otherwise holds, so
// while its operation is idle neither its clock pin nor its outputs toggle.
// reset (asynchronous, active high) clears it, which works whether or not
// the clock is gated off.
module gated_reg #(
  parameter int unsigned W = 16
) (
  input  logic         gclk,
  input  logic         reset,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge gclk or posedge reset) begin
    if (reset) q <= '0;
    else       q <= d;
  end
endmodule
