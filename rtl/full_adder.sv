// full_adder: one-bit full adder, the cell the ripple-carry adders are built from.
// sum = x XOR y XOR cin; cout is the majority of the three inputs.
// Purely combinational, no clock.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic cin,
  output logic sum,
  output logic cout
);
  always_comb begin
    sum  = x ^ y ^ cin;
    cout = (x & y) | (x & cin) | (y & cin);
  end
endmodule
