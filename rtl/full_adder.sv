// full_adder: one-bit full adder, the three-input counter cell of the
// Baugh-Wooley array.
//
// The sum bit is the parity of the three inputs and the carry bit is their
// majority, so {cout, s} = a + b + cin.  Purely combinational, no clock.
// The cell and its equations follow the reference design.
module full_adder (
  input  logic a,     // addend bit
  input  logic b,     // addend bit
  input  logic cin,   // third addend bit (carry in)
  output logic s,     // sum bit, weight 1
  output logic cout   // carry bit, weight 2
);

  always_comb begin
    s    = a ^ b ^ cin;
    cout = (a & b) | (cin & (a ^ b));
  end

endmodule
