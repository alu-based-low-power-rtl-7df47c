// tb_bec: exhaustive self-check of the Binary to Excess-1 Converter at its
// default width (3) and at the widest width used in the 16-bit CSLA (6):
// every input must come out incremented by one, modulo 2^W.
module tb_bec;
  int checks = 0, failures = 0;

  logic [2:0] x3, y3;
  logic [5:0] x6, y6;

  bec          dut3 (.x(x3), .y(y3));
  bec #(.W(6)) dut6 (.x(x6), .y(y6));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      x3 = 3'(v);
      #1;
      checks++;
      if (y3 != 3'(v + 1)) begin
        failures++;
        $display("W=3 FAIL %0d -> %0d", v, y3);
      end
    end
    for (int v = 0; v < 64; v++) begin
      x6 = 6'(v);
      #1;
      checks++;
      if (y6 != 6'(v + 1)) begin
        failures++;
        $display("W=6 FAIL %0d -> %0d", v, y6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
