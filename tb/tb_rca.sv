// tb_rca: exhaustive self-check of the ripple carry adder at its default
// width (2) and at the widest group width of the 16-bit CSLA (5). Every
// a, b, cin combination is applied and {cout, sum} compared with a + b + cin.
module tb_rca;
  int checks = 0, failures = 0;

  logic [1:0] a2, b2, s2;  logic ci2, co2;
  logic [4:0] a5, b5, s5;  logic ci5, co5;

  rca           dut2 (.a(a2), .b(b2), .cin(ci2), .sum(s2), .cout(co2));
  rca #(.W(5))  dut5 (.a(a5), .b(b5), .cin(ci5), .sum(s5), .cout(co5));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 4; x++)
      for (int y = 0; y < 4; y++)
        for (int c = 0; c < 2; c++) begin
          a2 = 2'(x); b2 = 2'(y); ci2 = 1'(c);
          #1;
          checks++;
          if ({co2, s2} != 3'(x + y + c)) begin
            failures++;
            $display("W=2 FAIL %0d+%0d+%0d -> %0d", x, y, c, {co2, s2});
          end
        end
    for (int x = 0; x < 32; x++)
      for (int y = 0; y < 32; y++)
        for (int c = 0; c < 2; c++) begin
          a5 = 5'(x); b5 = 5'(y); ci5 = 1'(c);
          #1;
          checks++;
          if ({co5, s5} != 6'(x + y + c)) begin
            failures++;
            $display("W=5 FAIL %0d+%0d+%0d -> %0d", x, y, c, {co5, s5});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
