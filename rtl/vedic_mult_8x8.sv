// vedic_mult_8x8: 8x8-bit unsigned Vedic multiplier (Urdhva-Tiryakbhyam,
// "vertically and crosswise"), the top of the design.
//
// Each operand is split into 4-bit halves. Four 4x4 Vedic blocks form the
// vertical and crosswise partial products
//   q0 = a[3:0]*b[3:0]  (lower bits, vertical)
//   q1 = a[7:4]*b[3:0]  (crosswise)
//   q2 = a[3:0]*b[7:4]  (crosswise)
//   q3 = a[7:4]*b[7:4]  (upper bits, vertical)
// and three adders place and sum them:
//   s_hi   = {q3, 4'b0000} + {4'b0000, q2}   (12 bits)
//   s_mid  = q1 + {4'b0000, q0[7:4]}          (8 bits)
//   q[15:4] = s_hi + {4'b0000, s_mid}         (12 bits)
//   q[3:0]  = q0[3:0]
// This block structure, the operand halves fed to each 4x4 block, the
// concatenations at the adder inputs and the output split q[15:4] / q[3:0]
// follow the published architecture. Its choices of a ripple-carry adder and
// of a recursive 4x4 block are this design's own.
//
// None of the three sums can overflow its adder (255*255 = 65025 < 2**16),
// so the adders' carry outs must stay zero; an assertion checks it.
//
// Interface: a, b eight-bit unsigned operands; q = a*b, sixteen bits; 32 I/O
// bits in all. Purely combinational: no clock, no reset, result valid one
// propagation delay after the operands change.
module vedic_mult_8x8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] q
);
  logic [7:0]  q0, q1, q2, q3;
  logic [11:0] s_hi;
  logic [7:0]  s_mid;
  logic [11:0] s_top;
  // carry outs, zero for every operand pair (see above)
  logic        co_hi, co_mid, co_top;

  vedic_mult_4x4 u_q0 (.a(a[3:0]), .b(b[3:0]), .q(q0));
  vedic_mult_4x4 u_q1 (.a(a[7:4]), .b(b[3:0]), .q(q1));
  vedic_mult_4x4 u_q2 (.a(a[3:0]), .b(b[7:4]), .q(q2));
  vedic_mult_4x4 u_q3 (.a(a[7:4]), .b(b[7:4]), .q(q3));

  rc_adder #(.WIDTH(12)) u_add_hi (
    .x   ({q3, 4'b0000}),
    .y   ({4'b0000, q2}),
    .sum (s_hi),
    .cout(co_hi)
  );

  rc_adder #(.WIDTH(8)) u_add_mid (
    .x   (q1),
    .y   ({4'b0000, q0[7:4]}),
    .sum (s_mid),
    .cout(co_mid)
  );

  rc_adder #(.WIDTH(12)) u_add_top (
    .x   (s_hi),
    .y   ({4'b0000, s_mid}),
    .sum (s_top),
    .cout(co_top)
  );

  // the partial-product sums never overflow their adders
  always_comb begin
    assert (!(co_hi || co_mid || co_top))
      else $error("vedic_mult_8x8: adder overflow, a=%0d b=%0d", a, b);
  end

  assign q = {s_top, q0[3:0]};
endmodule
