// bw_mult: WIDTH x WIDTH two's-complement multiplier using the
// Baugh-Wooley bit matrix, product 2*WIDTH bits wide.  Purely combinational.
//
// With N = WIDTH, the negative partial products x[i]*y[N-1] and
// x[N-1]*y[j] (i, j < N-1) are replaced by the addition of their two's
// complements, exactly as in the 4-bit derivation, so that the product is a
// sum of non-negative bits:
//
//   x[i]&y[j]       at 2^(i+j)       for i, j < N-1, and for i = j = N-1
//   ~x[i]&y[N-1]    at 2^(i+N-1)     for i < N-1
//   x[N-1]&~y[j]    at 2^(j+N-1)     for j < N-1
//   x[N-1], y[N-1]  at 2^(N-1)
//   ~x[N-1], ~y[N-1] at 2^(2N-2)
//   1               at 2^(2N-1)      (the two -2^(2N-2) offsets, modulo 2^2N)
//
// Summing these bits with full and half adders follows the reference
// design; how the adders are arranged for a general width is this design's
// own choice, the simplest regular one: the bits are laid out as N+2 rows
// of 2N bits (N partial-product rows, two correction rows), reduced by a
// linear chain of carry-save rows of full adders, and the last sum and
// carry vectors are added by a ripple-carry adder (a half adder in bit 0,
// full adders above).  Carries out of bit 2N-1 are dropped: the product is
// exact in 2N bits.  Adders fed by constant zeros are left for synthesis to
// remove.  At WIDTH = 4 the bit matrix is the same as that of mult4bw.
//
// Parameter: WIDTH >= 2, operand width (default 4, the width of the
// worked example).
module bw_mult #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0]   x,   // signed multiplicand
  input  logic [WIDTH-1:0]   y,   // signed multiplier
  output logic [2*WIDTH-1:0] p    // signed product x*y
);

  localparam int unsigned N  = WIDTH;
  localparam int unsigned W  = 2 * WIDTH;
  localparam int unsigned NR = WIDTH + 2;   // rows of the bit matrix

  // Bit matrix: row j < N is partial-product row j, shifted left by j;
  // rows N and N+1 hold the correction bits taken from x and from y.
  logic [NR-1:0][W-1:0] row;

  always_comb begin
    row = '0;
    for (int j = 0; j < N; j++) begin
      for (int i = 0; i < N; i++) begin
        if ((i == N - 1) && (j != N - 1))
          row[j][i+j] = x[N-1] & ~y[j];
        else if ((i != N - 1) && (j == N - 1))
          row[j][i+j] = ~x[i] & y[N-1];
        else
          row[j][i+j] = x[i] & y[j];
      end
    end
    row[N][N-1]     = x[N-1];
    row[N][W-2]     = ~x[N-1];
    row[N][W-1]     = 1'b1;
    row[N+1][N-1]   = y[N-1];
    row[N+1][W-2]   = ~y[N-1];
  end

  // Carry-save chain.  Stage k (k = 2 .. NR-1) adds row k to the running
  // sum/carry pair; stage 1 is just rows 0 and 1.
  logic [NR-1:1][W-1:0] sum_v;    // running sum vector after stage k
  logic [NR-1:1][W-1:0] car_v;    // running carry vector after stage k, aligned
  logic [NR-1:2][W-1:0] cout_v;   // raw carry outputs of stage k

  assign sum_v[1]  = row[0];
  assign car_v[1]  = row[1];

  for (genvar k = 2; k < NR; k++) begin : g_csa
    for (genvar b = 0; b < W; b++) begin : g_bit
      full_adder u_fa (
        .a   (sum_v[k-1][b]),
        .b   (car_v[k-1][b]),
        .cin (row[k][b]),
        .s   (sum_v[k][b]),
        .cout(cout_v[k][b])
      );
    end
    // carries move one column left; the one out of the MSB is dropped
    assign car_v[k] = {cout_v[k][W-2:0], 1'b0};
  end

  // Final ripple-carry adder of the last sum and carry vectors.
  logic [W-1:0] rc;   // carry out of each bit; rc[W-1] is dropped

  half_adder u_ha0 (
    .a   (sum_v[NR-1][0]),
    .b   (car_v[NR-1][0]),
    .s   (p[0]),
    .cout(rc[0])
  );

  for (genvar b = 1; b < W; b++) begin : g_rca
    full_adder u_fa (
      .a   (sum_v[NR-1][b]),
      .b   (car_v[NR-1][b]),
      .cin (rc[b-1]),
      .s   (p[b]),
      .cout(rc[b])
    );
  end

endmodule
