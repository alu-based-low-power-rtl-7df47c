// tb_arith_unit: self-check of the arithmetic unit.
//
// For each of the eight arithmetic operations, applies edge-case and random
// operands and compares result and carry with a reference computed in
// 17-bit integer arithmetic (carry = bit 16 of the two's-complement sum the
// operation maps to, so 1 means "no borrow" for subtractions).
module tb_arith_unit;
  import alu_pkg::*;
  int checks = 0, failures = 0;

  arith_op_e         op;
  logic [DATA_W-1:0] a, b, y;
  logic              cout;

  arith_unit dut (.op(op), .a(a), .b(b), .y(y), .cout(cout));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [16:0] model(input arith_op_e o, input logic [15:0] x, input logic [15:0] z);
    case (o)
      AR_ADD:  return {1'b0, x} + {1'b0, z};
      AR_SUB:  return {1'b0, x} + {1'b0, ~z} + 17'd1;
      AR_RSB:  return {1'b0, z} + {1'b0, ~x} + 17'd1;
      AR_INCA: return {1'b0, x} + 17'd1;
      AR_DECA: return {1'b0, x} + 17'h0FFFF;
      AR_INCB: return {1'b0, z} + 17'd1;
      AR_DECB: return {1'b0, z} + 17'h0FFFF;
      AR_NEGA: return {1'b0, ~x} + 17'd1;
      default: return '0;
    endcase
  endfunction

  task automatic apply(input arith_op_e o, input logic [15:0] x, input logic [15:0] z);
    logic [16:0] exp;
    op = o; a = x; b = z;
    #1;
    exp = model(o, x, z);
    checks++;
    if ({cout, y} !== exp) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h -> %0d:%h expected %0d:%h", o.name(), x, z, cout, y, exp[16], exp[15:0]);
    end
  endtask

  initial begin
    // A few plain-number checks of the operation meanings.
    apply(AR_SUB, 16'd100, 16'd58);
    checks++; if (y !== 16'd42 || cout !== 1'b1) begin failures++; $display("100-58"); end
    apply(AR_SUB, 16'd5, 16'd7);
    checks++; if (y !== 16'hFFFE || cout !== 1'b0) begin failures++; $display("5-7"); end
    apply(AR_NEGA, 16'd1, 16'd0);
    checks++; if (y !== 16'hFFFF) begin failures++; $display("-1"); end
    for (int o = 0; o < 8; o++) begin
      apply(arith_op_e'(o), 16'h0000, 16'h0000);
      apply(arith_op_e'(o), 16'hFFFF, 16'hFFFF);
      apply(arith_op_e'(o), 16'hFFFF, 16'h0001);
      apply(arith_op_e'(o), 16'h8000, 16'h7FFF);
      for (int i = 0; i < 2000; i++)
        apply(arith_op_e'(o), 16'($urandom), 16'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
