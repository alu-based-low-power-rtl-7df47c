// tb_alu16_cg: end-to-end self-check of the clock-gated 16-bit ALU at its
// default parameters.
//
// Applies one operation per clock cycle (a, b, sel changed just after each
// rising edge), first all sixteen codes in order, then random ones with
// random and corner-case operands, with an asynchronous reset in the middle.
// A reference model computes every result and carry independently and keeps
// a copy of each of the sixteen result registers. Checked each cycle:
//   * out and cf one cycle after the operation was applied (latency 1);
//   * exactly one gated clock edge per cycle, on the selected operation's
//     register, and none on the other fifteen (clock gating);
//   * the idle registers still hold their last value;
//   * the idle unit's operands are zero (operand isolation);
//   * after reset, out, cf and all registers are 0;
//   * in a cycle with en low no gated clock runs at all and out, cf and
//     every register keep their values.
// Each of these mechanisms, every operation code, and a set and a clear carry
// flag are counted, and one that never happened counts as a failure.
module tb_alu16_cg;
  import alu_pkg::*;
  int checks = 0, failures = 0;

  logic              clk = 1'b0, reset = 1'b1, en = 1'b0;
  logic [DATA_W-1:0] a = '0, b = '0;
  logic [SEL_W-1:0]  sel = '0;
  logic [DATA_W-1:0] out;
  logic              cf;

  alu16_cg dut (.clk(clk), .reset(reset), .en(en), .a(a), .b(b), .sel(sel), .out(out), .cf(cf));

  always #5 clk = ~clk;

  // Gated clock edges seen in the current cycle, per operation.
  int gedge [N_OPS];
  for (genvar i = 0; i < N_OPS; i++) begin : g_mon
    always @(posedge dut.gclk[i]) gedge[i]++;
  end

  // Reference model state.
  logic [DATA_W-1:0] shadow [N_OPS];
  logic              shadow_c [N_OPS];

  // Mechanism counters.
  int op_seen [N_OPS];
  int n_gated_off = 0, n_hold = 0, n_iso_ar = 0, n_iso_lu = 0;
  int n_cf1 = 0, n_cf0 = 0, n_reset = 0, n_latency = 0, n_idle = 0;

  initial begin : watchdog
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [DATA_W:0] model(input logic [SEL_W-1:0] s,
                                            input logic [DATA_W-1:0] x,
                                            input logic [DATA_W-1:0] z);
    logic [DATA_W:0] x1, z1;
    x1 = {1'b0, x};
    z1 = {1'b0, z};
    case (s)
      4'd0:  return x1 + z1;
      4'd1:  return x1 + {1'b0, ~z} + 1;
      4'd2:  return z1 + {1'b0, ~x} + 1;
      4'd3:  return x1 + 1;
      4'd4:  return x1 + 17'h0FFFF;
      4'd5:  return z1 + 1;
      4'd6:  return z1 + 17'h0FFFF;
      4'd7:  return {1'b0, ~x} + 1;
      4'd8:  return {1'b0, x & z};
      4'd9:  return {1'b0, x | z};
      4'd10: return {1'b0, x ^ z};
      4'd11: return {1'b0, ~(x & z)};
      4'd12: return {1'b0, ~(x | z)};
      4'd13: return {1'b0, ~(x ^ z)};
      4'd14: return {1'b0, ~x};
      default: return {1'b0, ~z};
    endcase
  endfunction

  task automatic clear_model();
    foreach (shadow[i]) begin shadow[i] = '0; shadow_c[i] = 1'b0; end
  endtask

  task automatic check_regs(input string tag);
    for (int i = 0; i < N_OPS; i++) begin
      logic [DATA_W-1:0] r;
      r = dut.res[i];
      checks++;
      if (r !== shadow[i]) begin
        failures++;
        $display("%s: register %0d = %h, expected %h", tag, i, r, shadow[i]);
      end
    end
  endtask

  // One operation: apply after a rising edge, check after the next one.
  task automatic run_op(input logic [SEL_W-1:0] s, input logic [DATA_W-1:0] x,
                        input logic [DATA_W-1:0] z);
    logic [DATA_W:0] exp;
    a = x; b = z; sel = s; en = 1'b1;
    exp = model(s, x, z);
    // Isolation check while the operation is decoded (clock low).
    @(negedge clk); #1;
    checks++;
    if (s[SEL_W-1] == UNIT_ARITH) begin
      if (dut.lu_a !== '0 || dut.lu_b !== '0) begin failures++; $display("logic unit not isolated"); end
      else n_iso_lu++;
    end else begin
      if (dut.ar_a !== '0 || dut.ar_b !== '0) begin failures++; $display("arith unit not isolated"); end
      else n_iso_ar++;
    end
    foreach (gedge[i]) gedge[i] = 0;
    @(posedge clk); #1;
    // Result, one cycle after the operation was applied.
    shadow[s] = exp[DATA_W-1:0];
    shadow_c[s] = (s[SEL_W-1] == UNIT_ARITH) ? exp[DATA_W] : 1'b0;
    checks++;
    if (out !== exp[DATA_W-1:0] || cf !== shadow_c[s]) begin
      failures++;
      $display("op %0d a=%h b=%h: out=%h cf=%0d, expected %h cf=%0d", s, x, z, out, cf,
               exp[DATA_W-1:0], shadow_c[s]);
    end else begin
      n_latency++;
      op_seen[s]++;
      if (cf) n_cf1++; else n_cf0++;
    end
    // Clock gating: exactly one gated edge, on the selected register.
    for (int i = 0; i < N_OPS; i++) begin
      checks++;
      if (gedge[i] != ((i == int'(s)) ? 1 : 0)) begin
        failures++;
        $display("op %0d: register %0d saw %0d gated edges", s, i, gedge[i]);
      end else if (i != int'(s)) n_gated_off++;
    end
    check_regs("hold");
    n_hold++;
  endtask

  // One cycle with en low: nothing may load and the outputs must hold.
  task automatic run_idle(input logic [SEL_W-1:0] s, input logic [DATA_W-1:0] x,
                          input logic [DATA_W-1:0] z);
    logic [DATA_W-1:0] out_before;
    logic              cf_before;
    out_before = out; cf_before = cf;
    a = x; b = z; sel = s; en = 1'b0;
    @(negedge clk); #1;
    foreach (gedge[i]) gedge[i] = 0;
    @(posedge clk); #1;
    checks++;
    if (out !== out_before || cf !== cf_before) begin
      failures++;
      $display("idle cycle changed out %h -> %h", out_before, out);
    end
    for (int i = 0; i < N_OPS; i++) begin
      checks++;
      if (gedge[i] != 0) begin failures++; $display("idle cycle: register %0d clocked", i); end
    end
    check_regs("idle");
    n_idle++;
  endtask

  initial begin
    logic [DATA_W-1:0] corner [6] = '{16'h0000, 16'hFFFF, 16'h0001, 16'h8000, 16'h7FFF, 16'hAAAA};
    foreach (op_seen[i]) op_seen[i] = 0;
    foreach (gedge[i]) gedge[i] = 0;
    clear_model();

    // Reset, then all codes in order.
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;
    checks++;
    if (out !== '0 || cf !== 1'b0) begin failures++; $display("out not 0 after reset"); end
    for (int s = 0; s < N_OPS; s++)
      run_op(SEL_W'(s), 16'h1234, 16'h4567);

    // Random operations with some corner operands.
    for (int i = 0; i < 3000; i++) begin
      logic [DATA_W-1:0] x, z;
      x = ($urandom_range(0, 7) == 0) ? corner[$urandom_range(0, 5)] : DATA_W'($urandom);
      z = ($urandom_range(0, 7) == 0) ? corner[$urandom_range(0, 5)] : DATA_W'($urandom);
      if ($urandom_range(0, 4) == 0) run_idle(SEL_W'($urandom), x, z);
      else run_op(SEL_W'($urandom), x, z);

      // Asynchronous reset in the middle of the run, while the clock is high.
      if (i == 1500) begin
        reset = 1'b1;
        #1;
        clear_model();
        checks++;
        if (out !== '0 || cf !== 1'b0) begin failures++; $display("out not cleared by reset"); end
        check_regs("reset");
        n_reset++;
        @(posedge clk); #1 reset = 1'b0;
      end
    end

    // Every mechanism must have happened.
    foreach (op_seen[i]) begin
      checks++;
      if (op_seen[i] == 0) begin failures++; $display("operation %0d never checked", i); end
    end
    checks++; if (n_gated_off == 0) begin failures++; $display("clock gating never seen"); end
    checks++; if (n_hold == 0)      begin failures++; $display("register hold never seen"); end
    checks++; if (n_iso_ar == 0)    begin failures++; $display("arith isolation never seen"); end
    checks++; if (n_iso_lu == 0)    begin failures++; $display("logic isolation never seen"); end
    checks++; if (n_cf1 == 0 || n_cf0 == 0) begin failures++; $display("carry flag not both ways"); end
    checks++; if (n_reset == 0)     begin failures++; $display("reset never applied"); end
    checks++; if (n_idle == 0)      begin failures++; $display("idle (en low) never applied"); end
    $display("ops=%0d idle=%0d gated-off edges=%0d isolated arith/logic=%0d/%0d cf=1/0 %0d/%0d resets=%0d",
             n_latency, n_idle, n_gated_off, n_iso_ar, n_iso_lu, n_cf1, n_cf0, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
