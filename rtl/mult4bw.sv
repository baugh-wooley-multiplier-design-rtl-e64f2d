// mult4bw: 4-bit x 4-bit two's-complement multiplier in the Baugh-Wooley
// arrangement, 8-bit two's-complement product.  Purely combinational.
//
// Idea: the two partial-product rows that carry the sign weight
// (x[i]*y[3] and x[3]*y[j] for i, j < 3) are negative.  Instead of
// subtracting them, their two's complements are added.  That turns the whole
// product into a sum of non-negative bits:
//
//   weight 2^0..2^5 : x[i]&y[j]        (i, j < 3)
//   weight 2^3..2^5 : ~x[i]&y[3], x[3]&~y[j]  (i, j < 3)
//   weight 2^3      : x[3], y[3]
//   weight 2^6      : x[3]&y[3], ~x[3], ~y[3]
//   weight 2^7      : constant 1 (the two -2^6 offsets, i.e. -2^7, taken
//                     modulo 2^8)
//
// These bits are summed by 3 half adders (HA1..HA3) and 12 full adders
// (FA1..FA12) wired exactly as in the reference array diagram: a
// carry-save array in which sums drop one row and carries move one column
// left, closed by a ripple chain FA4 -> FA7 -> FA9 -> FA11 -> FA12 that
// produces p[3]..p[7].  Cell numbers and internal net names t1..t23 are the
// ones printed in that diagram.
//
// The carry out of FA12 (t23) has weight 2^8 and is discarded: the product
// is exact in 8 bits for every pair of 4-bit signed operands
// (range -56 .. +64), so the carry out carries no information.
module mult4bw (
  input  logic [3:0] x,   // signed multiplicand
  input  logic [3:0] y,   // signed multiplier
  output logic [7:0] p    // signed product x*y
);

  // Partial-product bits.  pp[i][j] is the (possibly complemented) product
  // bit of x[i] and y[j], with weight 2^(i+j).
  logic [3:0][3:0] pp;

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        if ((i == 3) != (j == 3))
          pp[i][j] = (i == 3) ? (x[3] & ~y[j]) : (~x[i] & y[3]);
        else
          pp[i][j] = x[i] & y[j];
      end
    end
  end

  // Internal nets of the array, numbered as in the diagram.
  logic [23:1] t;

  assign p[0] = pp[0][0];

  // Row 1: half adders
  half_adder ha1  (.a(pp[1][0]), .b(pp[0][1]), .s(p[1]),  .cout(t[1]));
  half_adder ha2  (.a(pp[2][0]), .b(pp[1][1]), .s(t[2]),  .cout(t[3]));
  half_adder ha3  (.a(pp[3][0]), .b(pp[2][1]), .s(t[5]),  .cout(t[6]));

  // Row 2
  full_adder fa1  (.a(t[2]),     .b(t[1]),  .cin(pp[0][2]), .s(p[2]),  .cout(t[4]));
  full_adder fa2  (.a(t[5]),     .b(t[3]),  .cin(pp[1][2]), .s(t[7]),  .cout(t[8]));
  full_adder fa5  (.a(pp[3][1]), .b(t[6]),  .cin(pp[2][2]), .s(t[12]), .cout(t[13]));

  // Row 3: last partial-product row and the 2^6 correction bits
  full_adder fa3  (.a(t[7]),     .b(t[4]),  .cin(pp[0][3]), .s(t[9]),  .cout(t[10]));
  full_adder fa6  (.a(t[12]),    .b(t[8]),  .cin(pp[1][3]), .s(t[14]), .cout(t[15]));
  full_adder fa8  (.a(pp[3][2]), .b(t[13]), .cin(pp[2][3]), .s(t[17]), .cout(t[18]));
  full_adder fa10 (.a(~x[3]),    .b(~y[3]), .cin(pp[3][3]), .s(t[20]), .cout(t[21]));

  // Row 4: ripple chain, with the 2^3 correction bits entering at FA4 and
  // the constant 2^7 one at FA12
  full_adder fa4  (.a(t[9]),     .b(x[3]),  .cin(y[3]),     .s(p[3]),  .cout(t[11]));
  full_adder fa7  (.a(t[14]),    .b(t[10]), .cin(t[11]),    .s(p[4]),  .cout(t[16]));
  full_adder fa9  (.a(t[17]),    .b(t[15]), .cin(t[16]),    .s(p[5]),  .cout(t[19]));
  full_adder fa11 (.a(t[20]),    .b(t[18]), .cin(t[19]),    .s(p[6]),  .cout(t[22]));
  full_adder fa12 (.a(1'b1),     .b(t[21]), .cin(t[22]),    .s(p[7]),  .cout(t[23]));

endmodule
