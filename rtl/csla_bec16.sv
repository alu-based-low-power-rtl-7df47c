// csla_bec16: 16-bit square-root carry select adder with Binary to Excess-1
// Converters (the low-power CSLA).
//
// A carry select adder cuts the carry chain into groups that each compute
// their result for both possible carries in, then pick one once the real
// carry arrives. The classic form spends a second RCA (carry in 1) per
// group; here each upper group has a single RCA with carry in 0, and a BEC,
// one bit wider, adds one to that RCA's {cout, sum} to form the carry-in-1
// result. This saves area and power for a small delay increase.
//
// Groups (square-root sizing, growing towards the MSB):
//   bits [1:0]   2-bit RCA, carry in = cin           (no BEC, no mux)
//   bits [3:2]   2-bit RCA + 3-bit BEC + 6:3 mux
//   bits [6:4]   3-bit RCA + 4-bit BEC + 8:4 mux
//   bits [10:7]  4-bit RCA + 5-bit BEC + 10:5 mux
//   bits [15:11] 5-bit RCA + 6-bit BEC + 12:6 mux -> sum[15:11], cout
// Each mux is steered by the carry out of the group below. The group
// layout, BEC widths and mux sizes follow the published structure; the
// adder is fixed at 16 bits because that layout is given for 16 bits only.
//
// Interface: sum/cout = a + b + cin. Combinational.
module csla_bec16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic        cin,
  output logic [15:0] sum,
  output logic        cout
);
  localparam int unsigned NG = 4;  // groups above the lowest one
  // LSB of every group, and one past the MSB.
  localparam int unsigned LSB [NG+1] = '{2, 4, 7, 11, 16};

  logic [NG:0] c;  // c[0]: carry out of bits [1:0]; c[k]: out of upper group k

  rca #(.W(2)) u_rca0 (
    .a   (a[1:0]),
    .b   (b[1:0]),
    .cin (cin),
    .sum (sum[1:0]),
    .cout(c[0])
  );

  for (genvar g = 0; g < NG; g++) begin : g_grp
    localparam int unsigned L = LSB[g];
    localparam int unsigned W = LSB[g+1] - LSB[g];

    logic [W-1:0] s0;      // RCA sum for carry in 0
    logic         c0;      // RCA carry for carry in 0
    logic [W:0]   r1;      // BEC output: {cout, sum} for carry in 1
    logic [W:0]   r;       // selected {cout, sum}

    rca #(.W(W)) u_rca (
      .a   (a[L+W-1:L]),
      .b   (b[L+W-1:L]),
      .cin (1'b0),
      .sum (s0),
      .cout(c0)
    );

    bec #(.W(W+1)) u_bec (
      .x({c0, s0}),
      .y(r1)
    );

    csla_mux #(.W(W+1)) u_mux (
      .d0({c0, s0}),
      .d1(r1),
      .s (c[g]),
      .y (r)
    );

    assign sum[L+W-1:L] = r[W-1:0];
    assign c[g+1]       = r[W];
  end

  assign cout = c[NG];
endmodule
