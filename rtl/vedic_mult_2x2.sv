// vedic_mult_2x2: 2x2-bit unsigned Vedic (Urdhva-Tiryakbhyam) multiplier cell,
// the leaf of the recursive 4x4 multiplier.
//
// Vertically and crosswise on two-bit operands: the vertical product a0*b0 is
// bit 0; the crosswise products a1*b0 and a0*b1 are added by a half adder to
// give bit 1 and a carry; the vertical product a1*b1 plus that carry, added by
// a second half adder, gives bits 2 and 3. The cell is this design's own
// choice of how to build the 4x4 block, following the usual Vedic recursion.
//
// Interface: a, b two-bit operands, q = a*b (four bits). Combinational.
module vedic_mult_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] q
);
  logic p00, p10, p01, p11;
  logic c1;

  always_comb begin
    p00 = a[0] & b[0];
    p10 = a[1] & b[0];
    p01 = a[0] & b[1];
    p11 = a[1] & b[1];
  end

  assign q[0] = p00;

  half_adder u_ha_cross (
    .x    (p10),
    .y    (p01),
    .sum  (q[1]),
    .carry(c1)
  );

  half_adder u_ha_top (
    .x    (p11),
    .y    (c1),
    .sum  (q[2]),
    .carry(q[3])
  );
endmodule
