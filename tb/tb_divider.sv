// tb_divider: checks quotient, remainder and the data-dependent latency
// (quotient + 1 clocks from start to done) of the repeated-subtraction
// divider over random and corner-case operands, zero divisor included.
module tb_divider;
  localparam int W = 11;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [W-1:0] dividend, divisor, quotient, remainder;
  logic busy, done;
  int checks = 0, failures = 0;

  divider dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int a, input int b);
    int cycles, eq, er;
    @(negedge clk);
    dividend = W'(a); divisor = W'(b); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    if (b == 0) begin eq = (1 << W) - 1; er = a; end
    else begin eq = a / b; er = a % b; end
    checks++;
    if (int'(quotient) != eq || int'(remainder) != er) begin
      failures++;
      $display("FAIL %0d/%0d: got q=%0d r=%0d", a, b, quotient, remainder);
    end
    checks++;
    if (b != 0 && cycles != eq + 2) begin
      failures++;
      $display("FAIL %0d/%0d: %0d cycles, expected %0d", a, b, cycles, eq + 2);
    end
  endtask

  initial begin
    dividend = '0; divisor = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    run(0, 25); run(24, 25); run(25, 25); run(775, 25); run(1575, 25); run(100, 0);
    for (int i = 0; i < 300; i++) run($urandom_range(1575), $urandom_range(1, 60));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
