// tb_logic_unit: self-check of the bitwise logic unit. Every operation is
// applied to fixed and random operands and compared with the SystemVerilog
// operator it stands for.
module tb_logic_unit;
  import alu_pkg::*;
  int checks = 0, failures = 0;

  logic_op_e         op;
  logic [DATA_W-1:0] a, b, y;

  logic_unit dut (.op(op), .a(a), .b(b), .y(y));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] model(input logic_op_e o, input logic [15:0] x, input logic [15:0] z);
    case (o)
      LU_AND:  return x & z;
      LU_OR:   return x | z;
      LU_XOR:  return x ^ z;
      LU_NAND: return ~(x & z);
      LU_NOR:  return ~(x | z);
      LU_XNOR: return x ~^ z;
      LU_NOTA: return ~x;
      LU_NOTB: return ~z;
      default: return '0;
    endcase
  endfunction

  initial begin
    for (int o = 0; o < 8; o++)
      for (int i = 0; i < 1000; i++) begin
        logic [15:0] x, z;
        x = (i == 0) ? 16'hF0F0 : 16'($urandom);
        z = (i == 0) ? 16'hFF00 : 16'($urandom);
        op = logic_op_e'(o); a = x; b = z;
        #1;
        checks++;
        if (y !== model(op, x, z)) begin
          failures++;
          $display("FAIL op=%s a=%h b=%h -> %h", op.name(), x, z, y);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
