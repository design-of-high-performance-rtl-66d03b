// rc_adder: WIDTH-bit unsigned adder used to sum the shifted partial products
// of the Vedic multipliers.
//
// The architecture calls for plain two-input adders as its building blocks but
// does not say how they are built. This one is the simplest choice: a chain of
// WIDTH full adders with the carry rippling from bit 0 upwards and no carry in.
//
// Interface: x, y are the addends; sum = (x + y) mod 2**WIDTH; cout is the
// carry out of bit WIDTH-1. Purely combinational: the result settles after
// WIDTH full-adder carry delays; there is no clock and no latency in cycles.
// WIDTH defaults to 12, the width of the widest adders of the 8x8 multiplier.
module rc_adder #(
  parameter int unsigned WIDTH = 12
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  // carry[i] is the carry into bit i
  logic [WIDTH:0] carry;

  assign carry[0] = 1'b0;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (
      .x   (x[i]),
      .y   (y[i]),
      .cin (carry[i]),
      .sum (sum[i]),
      .cout(carry[i+1])
    );
  end

  assign cout = carry[WIDTH];
endmodule
