// tb_csla_bec16: self-check of the 16-bit BEC carry select adder.
//
// Applies the vector 0x1234 + 0x4567 (= 0x579B), corner cases that make every
// group's carry ripple through (all ones plus one, alternating patterns),
// and random operands, and compares {cout, sum} with a + b + cin computed in
// 17-bit integer arithmetic. It also counts, for each of the four group
// multiplexers, how often the carry from below selected the BEC (carry-in-1)
// path and the RCA (carry-in-0) path, and fails if either path of any group
// was never exercised.
module tb_csla_bec16;
  int checks = 0, failures = 0;

  logic [15:0] a, b, sum;
  logic        cin, cout;
  int          sel1 [4];
  int          sel0 [4];

  csla_bec16 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Group carries recomputed independently: carry into bit 2, 4, 7, 11.
  function automatic logic carry_into(input logic [15:0] x, input logic [15:0] y,
                                      input logic ci, input int bitpos);
    logic [16:0] part;
    logic [15:0] mask;
    mask = 16'((32'd1 << bitpos) - 1);
    part = {1'b0, x & mask} + {1'b0, y & mask} + 17'(ci);
    return part[bitpos];
  endfunction

  task automatic apply(input logic [15:0] x, input logic [15:0] y, input logic ci);
    logic [16:0] exp;
    int          pos [4] = '{2, 4, 7, 11};
    a = x; b = y; cin = ci;
    #1;
    exp = {1'b0, x} + {1'b0, y} + 17'(ci);
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      $display("FAIL %h + %h + %0d -> %0d:%h, expected %0d:%h", x, y, ci, cout, sum, exp[16], exp[15:0]);
    end
    for (int g = 0; g < 4; g++)
      if (carry_into(x, y, ci, pos[g])) sel1[g]++; else sel0[g]++;
  endtask

  initial begin
    for (int g = 0; g < 4; g++) begin sel1[g] = 0; sel0[g] = 0; end
    apply(16'h1234, 16'h4567, 1'b0);
    checks++;
    if (sum !== 16'h579B || cout !== 1'b0) begin
      failures++;
      $display("FAIL reference vector 1234+4567 -> %h", sum);
    end
    apply(16'hFFFF, 16'h0001, 1'b0);
    apply(16'hFFFF, 16'h0000, 1'b1);
    apply(16'hFFFF, 16'hFFFF, 1'b1);
    apply(16'h0000, 16'h0000, 1'b0);
    apply(16'hAAAA, 16'h5555, 1'b1);
    apply(16'h8000, 16'h8000, 1'b0);
    for (int i = 0; i < 20000; i++)
      apply(16'($urandom), 16'($urandom), 1'($urandom));
    for (int g = 0; g < 4; g++) begin
      checks++;
      if (sel1[g] == 0 || sel0[g] == 0) begin
        failures++;
        $display("group %0d mux path never used: bec=%0d rca=%0d", g + 1, sel1[g], sel0[g]);
      end
    end
    $display("mux selections bec/rca: g1 %0d/%0d g2 %0d/%0d g3 %0d/%0d g4 %0d/%0d",
             sel1[0], sel0[0], sel1[1], sel0[1], sel1[2], sel0[2], sel1[3], sel0[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
