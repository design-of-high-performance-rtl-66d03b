// tb_rc_adder: self-checking testbench for the ripple-carry adder.
//
// Two instances are checked: the default 12-bit adder, against corner cases
// (full carry ripple from bit 0 to the carry out) and random operands, and a
// 4-bit adder, exhaustively. Expected values come from the simulator's own
// integer addition. The adder is combinational; operands are applied on the
// falling edge of a free-running check clock and compared on the rising edge.
// A watchdog ends the run with a failure if it exceeds its cycle budget.
module tb_rc_adder;
  localparam int unsigned W  = 12;
  localparam int unsigned WS = 4;
  localparam int unsigned NRAND = 5000;
  localparam int unsigned WATCHDOG_CYCLES = 20000;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0]  x, y, sum;
  logic          cout;
  logic [WS-1:0] xs, ys, sums;
  logic          couts;

  int checks = 0;
  int failures = 0;

  rc_adder dut (.x(x), .y(y), .sum(sum), .cout(cout));
  rc_adder #(.WIDTH(WS)) dut_small (.x(xs), .y(ys), .sum(sums), .cout(couts));

  task automatic check_wide(input logic [W-1:0] xv, input logic [W-1:0] yv);
    logic [W:0] expected;
    @(negedge clk);
    x = xv;
    y = yv;
    @(posedge clk);
    expected = {1'b0, xv} + {1'b0, yv};
    checks++;
    if ({cout, sum} !== expected) begin
      failures++;
      $display("FAIL W=%0d: %0d + %0d gave cout=%0b sum=%0d, expected %0d",
               W, xv, yv, cout, sum, expected);
    end
  endtask

  task automatic check_small(input logic [WS-1:0] xv, input logic [WS-1:0] yv);
    logic [WS:0] expected;
    @(negedge clk);
    xs = xv;
    ys = yv;
    @(posedge clk);
    expected = {1'b0, xv} + {1'b0, yv};
    checks++;
    if ({couts, sums} !== expected) begin
      failures++;
      $display("FAIL W=%0d: %0d + %0d gave cout=%0b sum=%0d, expected %0d",
               WS, xv, yv, couts, sums, expected);
    end
  endtask

  initial begin
    x = '0; y = '0; xs = '0; ys = '0;
    // corner cases: zero, full ripple, largest operands, single bits
    check_wide('0, '0);
    check_wide('1, 12'd1);
    check_wide('1, '1);
    check_wide(12'h800, 12'h800);
    check_wide(12'h555, 12'haaa);
    check_wide(12'h555, 12'hab);
    for (int i = 0; i < W; i++) check_wide(12'(1) << i, 12'(1) << i);
    for (int i = 0; i < NRAND; i++) check_wide(W'($urandom), W'($urandom));
    for (int i = 0; i < (1 << WS); i++)
      for (int j = 0; j < (1 << WS); j++)
        check_small(WS'(i), WS'(j));
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
