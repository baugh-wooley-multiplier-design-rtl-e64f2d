// bw_mult_top: the Baugh-Wooley signed multipliers side by side.
//
// Two independent combinational multipliers with their own ports:
//   * mult4bw - the 4 x 4 array of the reference diagram (x4, y4 -> p4),
//     built cell by cell from 3 half adders and 12 full adders;
//   * bw_mult - the same construction extended to WIDE_WIDTH x WIDE_WIDTH
//     operands (xw, yw -> pw).
// All operands and products are two's complement.  There is no clock and no
// state: each product is valid one combinational settling time after its
// operands change.
//
// The reference design presents the 4-bit multiplier and states that the
// transformation extends to wider operands, naming 16 x 16 and 32 x 32 as
// examples.  Bringing out a wide instance next to the 4-bit one, and its
// default width of 32, are this design's choices: at 32 bits it serves both
// examples, since a 16 x 16 signed product is obtained by sign-extending
// both operands to 32 bits and reading the low 32 bits of pw.
module bw_mult_top #(
  parameter int unsigned WIDE_WIDTH = 32
) (
  input  logic [3:0]              x4,   // 4-bit signed multiplicand
  input  logic [3:0]              y4,   // 4-bit signed multiplier
  output logic [7:0]              p4,   // 8-bit signed product
  input  logic [WIDE_WIDTH-1:0]   xw,   // wide signed multiplicand
  input  logic [WIDE_WIDTH-1:0]   yw,   // wide signed multiplier
  output logic [2*WIDE_WIDTH-1:0] pw    // wide signed product
);

  mult4bw u_mult4 (
    .x(x4),
    .y(y4),
    .p(p4)
  );

  bw_mult #(
    .WIDTH(WIDE_WIDTH)
  ) u_mult_wide (
    .x(xw),
    .y(yw),
    .p(pw)
  );

endmodule
