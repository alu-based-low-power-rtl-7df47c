// tb_op_decoder: self-check of the falling-edge operation decoder.
//
// Drives sel after each rising edge and checks after the falling edge that
// op_q equals sel and en_q has exactly bit sel set. Also checks that reset
// clears the enables, that en low yields no enable at all, that the outputs
// do not move on a rising edge (they must be stable while the clock is
// high), and that every code is decoded.
module tb_op_decoder;
  import alu_pkg::*;
  int checks = 0, failures = 0;

  logic             clk = 1'b0, reset = 1'b1, en = 1'b1;
  int               n_off = 0;
  logic [SEL_W-1:0] sel = '0;
  logic [SEL_W-1:0] op_q;
  logic [N_OPS-1:0] en_q;
  int               seen [N_OPS];

  op_decoder dut (.clk(clk), .reset(reset), .en(en), .sel(sel), .op_q(op_q), .en_q(en_q));

  always #5 clk = ~clk;

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen[i]) seen[i] = 0;
    #12;
    checks++;
    if (en_q !== '0 || op_q !== '0) begin failures++; $display("reset did not clear"); end
    @(posedge clk); #1 reset = 1'b0;
    for (int i = 0; i < 400; i++) begin
      logic [SEL_W-1:0] s;
      s = (i < N_OPS) ? SEL_W'(i) : SEL_W'($urandom);
      sel = s;
      en  = (i < N_OPS) ? 1'b1 : ($urandom_range(0, 3) != 0);
      @(negedge clk); #1;
      checks++;
      if (op_q !== s || en_q !== (en ? (N_OPS'(1) << s) : N_OPS'(0))) begin
        failures++;
        $display("sel=%0d en=%0d op_q=%0d en_q=%b", s, en, op_q, en_q);
      end else if (en) seen[s]++;
      else n_off++;
      @(posedge clk); #1;
      sel = ~s;  // change while clk high: must not reach the outputs yet
      #1;
      checks++;
      if (op_q !== s) begin failures++; $display("outputs moved while clk high"); end
    end
    reset = 1'b1; #1;
    checks++;
    if (en_q !== '0) begin failures++; $display("async reset did not clear en_q"); end
    checks++;
    if (n_off == 0) begin failures++; $display("en low never applied"); end
    foreach (seen[i]) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("code %0d never decoded", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
