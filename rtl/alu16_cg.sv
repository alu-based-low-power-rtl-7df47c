// alu16_cg: low-power 16-bit ALU with latch-free clock gating.
//
// The ALU performs sixteen operations (eight arithmetic, eight bitwise
// logic) on two 16-bit operands, selected by sel[3:0]. Power is saved by
// letting only the selected operation's hardware switch:
//   * op_decoder turns sel into sixteen one-hot enables on the falling edge;
//     with en low none is set and the whole ALU receives no clock edge;
//   * each enable gates the clock of that operation's own result register
//     (clock_gate, a plain AND: no latch), so the fifteen idle registers get
//     no clock edge;
//   * the operands of the idle unit are forced to zero (operand isolation),
//     so its data inputs stop toggling while the other unit works.
// The arithmetic unit is built on the BEC-based square-root carry select
// adder (csla_bec16).
//
// Operation codes (sel): 0 ADD, 1 SUB (A-B), 2 RSB (B-A), 3 INC A, 4 DEC A,
// 5 INC B, 6 DEC B, 7 NEG A, 8 AND, 9 OR, 10 XOR, 11 NAND, 12 NOR, 13 XNOR,
// 14 NOT A, 15 NOT B.
//
// Timing: present a, b, sel and en after a rising edge; sel and en are
// sampled at the falling edge and a, b at the next rising edge. out and cf
// show that operation's result from just after that rising edge: one result
// per cycle, one cycle of latency. They hold until the next operation
// completes; a cycle with en low changes nothing.
// cf is the adder's carry out for the arithmetic operations (for SUB, RSB,
// DEC and NEG: 1 = no borrow) and 0 for the logic operations.
// reset is asynchronous and active high; it clears every register, and
// out and cf read 0 until the first operation completes.
//
// The ports a, b, sel, clk, reset and out, the 16-bit width, the 4-bit
// select, the latch-free clock gating and the CSLA follow the design. The
// en and cf ports take the names of two signals seen in its simulation, but
// their behaviour here is this design's own, as are the operation set, one
// result register per operation, operand isolation and the falling-edge
// enable register.
module alu16_cg
  import alu_pkg::*;
(
  input  logic              clk,
  input  logic              reset,
  input  logic              en,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  input  logic [SEL_W-1:0]  sel,
  output logic [DATA_W-1:0] out,
  output logic              cf
);
  localparam int unsigned N_AR = N_OPS / 2;  // arithmetic operations, codes 0..7

  // ---- decode -----------------------------------------------------------
  logic [SEL_W-1:0] op_q;
  logic [N_OPS-1:0] en_q;

  op_decoder u_dec (
    .clk  (clk),
    .reset(reset),
    .en   (en),
    .sel  (sel),
    .op_q (op_q),
    .en_q (en_q)
  );

  // ---- operand isolation -------------------------------------------------
  logic              ar_act, lu_act;
  logic [DATA_W-1:0] ar_a, ar_b, lu_a, lu_b;

  assign ar_act = (op_q[SEL_W-1] == UNIT_ARITH) && (en_q != '0);
  assign lu_act = (op_q[SEL_W-1] == UNIT_LOGIC) && (en_q != '0);
  assign ar_a   = ar_act ? a : '0;
  assign ar_b   = ar_act ? b : '0;
  assign lu_a   = lu_act ? a : '0;
  assign lu_b   = lu_act ? b : '0;

  // ---- functional units ----------------------------------------------------
  logic [DATA_W-1:0] ar_y, lu_y;
  logic              ar_c;

  arith_unit u_arith (
    .op  (arith_op_e'(op_q[SEL_W-2:0])),
    .a   (ar_a),
    .b   (ar_b),
    .y   (ar_y),
    .cout(ar_c)
  );

  logic_unit u_logic (
    .op(logic_op_e'(op_q[SEL_W-2:0])),
    .a (lu_a),
    .b (lu_b),
    .y (lu_y)
  );

  // ---- gated clocks and per-operation result registers ---------------------
  logic [N_OPS-1:0]  gclk;
  logic [DATA_W-1:0] res [N_OPS];
  logic [N_AR-1:0]   car;  // carry of each arithmetic operation

  for (genvar i = 0; i < N_OPS; i++) begin : g_op
    clock_gate u_cg (
      .clk (clk),
      .en  (en_q[i]),
      .gclk(gclk[i])
    );

    if (i < N_AR) begin : g_ar
      gated_reg #(.W(DATA_W + 1)) u_reg (
        .gclk (gclk[i]),
        .reset(reset),
        .d    ({ar_c, ar_y}),
        .q    ({car[i], res[i]})
      );
    end else begin : g_lu
      gated_reg #(.W(DATA_W)) u_reg (
        .gclk (gclk[i]),
        .reset(reset),
        .d    (lu_y),
        .q    (res[i])
      );
    end
  end

  // ---- output selection ----------------------------------------------------
  // last_op names the register that loaded at the latest rising edge;
  // last_vld is 0 from reset until the first operation completes.
  logic [SEL_W-1:0] last_op;
  logic             last_vld;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      last_op  <= '0;
      last_vld <= 1'b0;
    end else if (en_q != '0) begin
      last_op  <= op_q;
      last_vld <= 1'b1;
    end
  end

  always_comb begin
    out = last_vld ? res[last_op] : '0;
    cf  = last_vld && (last_op[SEL_W-1] == UNIT_ARITH) ? car[last_op[SEL_W-2:0]] : 1'b0;
  end
endmodule
