// alu_pkg: constants and operation codes shared by the clock-gated 16-bit ALU.
//
// The ALU takes two 16-bit operands and a 4-bit operation select, as the
// design calls for. sel[3] picks the unit (0 = arithmetic unit built around the
// carry select adder, 1 = bitwise logic unit) and sel[2:0] the operation inside
// it. Which sixteen operations exist, and their codes, is this design's own
// choice: only the 16-bit operands and the 4-bit select are fixed.
package alu_pkg;

  localparam int unsigned DATA_W = 16;  // operand and result width
  localparam int unsigned SEL_W  = 4;   // operation select width
  localparam int unsigned N_OPS  = 16;  // 2**SEL_W operations, one gated register each

  // Arithmetic unit operations (sel[3] = 0). All run through the CSLA.
  typedef enum logic [2:0] {
    AR_ADD  = 3'd0,  // A + B
    AR_SUB  = 3'd1,  // A - B   = A + ~B + 1
    AR_RSB  = 3'd2,  // B - A   = B + ~A + 1
    AR_INCA = 3'd3,  // A + 1
    AR_DECA = 3'd4,  // A - 1   = A + 0xFFFF
    AR_INCB = 3'd5,  // B + 1
    AR_DECB = 3'd6,  // B - 1   = B + 0xFFFF
    AR_NEGA = 3'd7   // -A      = ~A + 1
  } arith_op_e;

  // Logic unit operations (sel[3] = 1).
  typedef enum logic [2:0] {
    LU_AND  = 3'd0,
    LU_OR   = 3'd1,
    LU_XOR  = 3'd2,
    LU_NAND = 3'd3,
    LU_NOR  = 3'd4,
    LU_XNOR = 3'd5,
    LU_NOTA = 3'd6,
    LU_NOTB = 3'd7
  } logic_op_e;

  // Unit field of sel.
  localparam logic UNIT_ARITH = 1'b0;
  localparam logic UNIT_LOGIC = 1'b1;

endpackage
