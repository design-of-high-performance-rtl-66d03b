// half_adder: one-bit half adder, the smallest adding cell of the multiplier.
// sum = x XOR y, carry = x AND y. Purely combinational, no clock.
// Used by the 2x2 Vedic cell for its crosswise column.
module half_adder (
  input  logic x,
  input  logic y,
  output logic sum,
  output logic carry
);
  always_comb begin
    sum   = x ^ y;
    carry = x & y;
  end
endmodule
