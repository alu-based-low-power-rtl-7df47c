// logic_unit: bitwise logic unit of the ALU.
//
// Eight bitwise operations on the two 16-bit operands: AND, OR, XOR, NAND,
// NOR, XNOR, NOT A and NOT B. The design asks for bitwise logic operations
// next to the arithmetic ones; which eight and their codes are this design's
// own choice. Combinational.
module logic_unit
  import alu_pkg::*;
(
  input  logic_op_e          op,
  input  logic [DATA_W-1:0]  a,
  input  logic [DATA_W-1:0]  b,
  output logic [DATA_W-1:0]  y
);
  always_comb begin
    unique case (op)
      LU_AND:  y = a & b;
      LU_OR:   y = a | b;
      LU_XOR:  y = a ^ b;
      LU_NAND: y = ~(a & b);
      LU_NOR:  y = ~(a | b);
      LU_XNOR: y = ~(a ^ b);
      LU_NOTA: y = ~a;
      LU_NOTB: y = ~b;
      default: y = '0;
    endcase
  end
endmodule
