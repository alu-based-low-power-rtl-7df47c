// arith_unit: arithmetic unit of the ALU, built around the BEC carry select adder.
//
// Every arithmetic operation is one pass through csla_bec16; only the adder's
// operands and carry in change with the operation:
//   ADD  A + B          x = A,  y = B,      cin = 0
//   SUB  A - B          x = A,  y = ~B,     cin = 1
//   RSB  B - A          x = B,  y = ~A,     cin = 1
//   INCA A + 1          x = A,  y = 0,      cin = 1
//   DECA A - 1          x = A,  y = 0xFFFF, cin = 0
//   INCB B + 1          x = B,  y = 0,      cin = 1
//   DECB B - 1          x = B,  y = 0xFFFF, cin = 0
//   NEGA -A             x = ~A, y = 0,      cin = 1
// cout is the adder's carry out: the unsigned overflow of an addition, and
// 1 = "no borrow" for a subtraction. That the CSLA is the unit's adder follows
// the design; the operation set and its codes are this design's own.
// Combinational.
module arith_unit
  import alu_pkg::*;
(
  input  arith_op_e          op,
  input  logic [DATA_W-1:0]  a,
  input  logic [DATA_W-1:0]  b,
  output logic [DATA_W-1:0]  y,
  output logic               cout
);
  logic [DATA_W-1:0] x_op, y_op;
  logic              cin;

  always_comb begin
    unique case (op)
      AR_ADD:  begin x_op = a;  y_op = b;  cin = 1'b0; end
      AR_SUB:  begin x_op = a;  y_op = ~b; cin = 1'b1; end
      AR_RSB:  begin x_op = b;  y_op = ~a; cin = 1'b1; end
      AR_INCA: begin x_op = a;  y_op = '0; cin = 1'b1; end
      AR_DECA: begin x_op = a;  y_op = '1; cin = 1'b0; end
      AR_INCB: begin x_op = b;  y_op = '0; cin = 1'b1; end
      AR_DECB: begin x_op = b;  y_op = '1; cin = 1'b0; end
      AR_NEGA: begin x_op = ~a; y_op = '0; cin = 1'b1; end
      default: begin x_op = a;  y_op = b;  cin = 1'b0; end
    endcase
  end

  csla_bec16 u_csla (
    .a   (x_op),
    .b   (y_op),
    .cin (cin),
    .sum (y),
    .cout(cout)
  );
endmodule
