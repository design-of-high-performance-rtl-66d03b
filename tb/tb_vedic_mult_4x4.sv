// tb_vedic_mult_4x4: exhaustive self-checking testbench for the 4x4 Vedic
// multiplier block.
//
// All 256 operand pairs are applied on the falling edge of a free-running
// check clock and the 8-bit product is compared on the next rising edge with
// the simulator's integer product. The block is combinational, so the product
// must be correct within that same half cycle. A watchdog ends the run with a
// failure if it exceeds its cycle budget.
module tb_vedic_mult_4x4;
  localparam int unsigned WATCHDOG_CYCLES = 1000;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] a, b;
  logic [7:0] q;

  int checks = 0;
  int failures = 0;

  vedic_mult_4x4 dut (.a(a), .b(b), .q(q));

  initial begin
    a = '0;
    b = '0;
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        @(negedge clk);
        a = 4'(i);
        b = 4'(j);
        @(posedge clk);
        checks++;
        if (q !== 8'(i * j)) begin
          failures++;
          $display("FAIL: %0d * %0d gave %0d, expected %0d", i, j, q, i * j);
        end
      end
    end
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
