// half_adder: one-bit half adder, the two-input counter cell of the
// Baugh-Wooley array.
//
// The sum bit is the parity of the two inputs and the carry bit is their
// conjunction, so {cout, s} = a + b.  Purely combinational, no clock.
// The cell and its equations follow the reference design; port names are
// the same as there so that the array netlists read naturally.
module half_adder (
  input  logic a,     // addend bit
  input  logic b,     // addend bit
  output logic s,     // sum bit, weight 1
  output logic cout   // carry bit, weight 2
);

  always_comb begin
    s    = a ^ b;
    cout = a & b;
  end

endmodule
