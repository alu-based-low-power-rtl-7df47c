// op_decoder: operation decoder that drives the clock gates.
//
// Samples sel and en on the falling clock edge and turns them into sixteen
// one-hot enables, one per operation; with en low all sixteen are 0, so no
// operation runs in the coming cycle and every gated clock stays off. Because the enables change only while clk is
// low, each can be ANDed straight into the clock (clock_gate) without a
// glitch on the following high phase.
//
// Timing: sel and en must be valid at the falling edge; en_q and op_q then hold the
// decoded operation through the next rising edge, where the enabled result
// register loads. reset (asynchronous, active high) clears the enables, so
// no gated clock runs while the ALU is in reset, and sets op_q to 0.
// Decoding the select into one line per operation follows the design;
// the falling-edge register is this design's own choice.
module op_decoder
  import alu_pkg::*;
(
  input  logic               clk,
  input  logic               reset,
  input  logic               en,     // an operation is requested this cycle
  input  logic [SEL_W-1:0]   sel,
  output logic [SEL_W-1:0]   op_q,   // operation of the coming rising edge
  output logic [N_OPS-1:0]   en_q    // one-hot clock enables
);
  logic [N_OPS-1:0] dec;

  always_comb begin
    dec      = '0;
    dec[sel] = 1'b1;
  end

  always_ff @(negedge clk or posedge reset) begin
    if (reset) begin
      op_q <= '0;
      en_q <= '0;
    end else begin
      op_q <= sel;
      en_q <= en ? dec : '0;
    end
  end
endmodule
