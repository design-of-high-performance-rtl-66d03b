// vedic_mult_4x4: 4x4-bit unsigned Vedic multiplier, the "4 x 4 multiply
// block" of which the 8x8 multiplier holds four.
//
// The architecture names this block and its function (a 4x4 multiplication)
// but not its insides. It is built here the same way the 8x8 multiplier is
// built from it, one level down: both operands are split into 2-bit halves,
// four 2x2 Vedic cells form the partial products
//   m0 = aL*bL, m1 = aH*bL, m2 = aL*bH, m3 = aH*bH,
// and three ripple-carry adders sum them:
//   s_hi  = {m3, 2'b00} + {2'b00, m2}     (6 bits)
//   s_mid = m1 + {2'b00, m0[3:2]}         (4 bits)
//   q[7:2] = s_hi + {2'b00, s_mid}        (6 bits), q[1:0] = m0[1:0].
// No sum can overflow its adder (15*15 = 225 fits in 8 bits), so the adders'
// carry outs are unused.
//
// Interface: a, b four-bit operands, q = a*b (eight bits). Combinational, no
// clock; delay is that of a 2x2 cell followed by two ripple adders.
module vedic_mult_4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] q
);
  logic [3:0] m0, m1, m2, m3;
  logic [5:0] s_hi;
  logic [3:0] s_mid;
  logic [5:0] s_top;
  // carry outs, zero for every operand pair (see above)
  logic       co_hi, co_mid, co_top;

  vedic_mult_2x2 u_m0 (.a(a[1:0]), .b(b[1:0]), .q(m0));
  vedic_mult_2x2 u_m1 (.a(a[3:2]), .b(b[1:0]), .q(m1));
  vedic_mult_2x2 u_m2 (.a(a[1:0]), .b(b[3:2]), .q(m2));
  vedic_mult_2x2 u_m3 (.a(a[3:2]), .b(b[3:2]), .q(m3));

  rc_adder #(.WIDTH(6)) u_add_hi (
    .x   ({m3, 2'b00}),
    .y   ({2'b00, m2}),
    .sum (s_hi),
    .cout(co_hi)
  );

  rc_adder #(.WIDTH(4)) u_add_mid (
    .x   (m1),
    .y   ({2'b00, m0[3:2]}),
    .sum (s_mid),
    .cout(co_mid)
  );

  rc_adder #(.WIDTH(6)) u_add_top (
    .x   (s_hi),
    .y   ({2'b00, s_mid}),
    .sum (s_top),
    .cout(co_top)
  );

  // the partial-product sums never overflow their adders
  always_comb begin
    assert (!(co_hi || co_mid || co_top))
      else $error("vedic_mult_4x4: adder overflow, a=%0d b=%0d", a, b);
  end

  assign q = {s_top, m0[1:0]};
endmodule
