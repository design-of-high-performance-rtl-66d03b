// tb_vedic_mult_8x8: end-to-end, exhaustive self-checking testbench for the
// 8x8 Vedic multiplier, at its only (full) size.
//
// All 65,536 operand pairs are applied on the falling edge of a free-running
// check clock and the 16-bit product is compared on the next rising edge with
// the simulator's integer product: the multiplier is combinational, so the
// result must be right within the same half cycle.
//
// Alongside, the testbench works out from the operands alone how the product
// is assembled and counts how often each step of the architecture does real
// work: each of the four 4x4 partial products being nonzero, the middle sum
// (crosswise product plus the upper nibble of the low product) spilling past
// bit 7, and the final adder carrying into the bits of the high partial
// product. Any of these that never happens counts as a failure. A watchdog
// ends the run with a failure if it exceeds its cycle budget.
module tb_vedic_mult_8x8;
  localparam int unsigned WATCHDOG_CYCLES = 70000;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0]  a, b;
  logic [15:0] q;

  int checks = 0;
  int failures = 0;
  int n_pp_lo = 0, n_pp_x1 = 0, n_pp_x2 = 0, n_pp_hi = 0;
  int n_mid_spill = 0, n_top_carry = 0;

  vedic_mult_8x8 dut (.a(a), .b(b), .q(q));

  task automatic count_mechanisms(input int unsigned av, input int unsigned bv);
    int unsigned p_lo, p_x1, p_x2, p_hi, s_hi, s_mid;
    p_lo  = (av % 16) * (bv % 16);
    p_x1  = (av / 16) * (bv % 16);
    p_x2  = (av % 16) * (bv / 16);
    p_hi  = (av / 16) * (bv / 16);
    s_hi  = p_hi * 16 + p_x2;
    s_mid = p_x1 + p_lo / 16;
    if (p_lo != 0) n_pp_lo++;
    if (p_x1 != 0) n_pp_x1++;
    if (p_x2 != 0) n_pp_x2++;
    if (p_hi != 0) n_pp_hi++;
    if (s_mid > 15) n_mid_spill++;
    if ((s_hi % 256) + s_mid > 255) n_top_carry++;
  endtask

  task automatic require(input string what, input int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL: %s never happened", what);
    end else begin
      $display("  %s: %0d times", what, count);
    end
  endtask

  initial begin
    a = '0;
    b = '0;
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        @(negedge clk);
        a = 8'(i);
        b = 8'(j);
        @(posedge clk);
        checks++;
        if (q !== 16'(i * j)) begin
          failures++;
          if (failures < 20)
            $display("FAIL: %0d * %0d gave %0d, expected %0d", i, j, q, i * j);
        end
        count_mechanisms(i, j);
      end
    end
    require("low partial product a[3:0]*b[3:0] nonzero", n_pp_lo);
    require("crosswise partial product a[7:4]*b[3:0] nonzero", n_pp_x1);
    require("crosswise partial product a[3:0]*b[7:4] nonzero", n_pp_x2);
    require("high partial product a[7:4]*b[7:4] nonzero", n_pp_hi);
    require("middle sum reaching past bit 7 of the product", n_mid_spill);
    require("final adder carrying into the high partial product", n_top_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired after %0d cycles", WATCHDOG_CYCLES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
