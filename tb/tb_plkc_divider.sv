// tb_plkc_divider: checks the shared divider against integer / and %: the
// original design's example 187113 / 3600 (remainder 3513), the second-stage
// division 4*3513 / 225, edge values and random operands. Also checks that
// done comes exactly 23 clocks after start and that start is ignored while
// busy.
module tb_plkc_divider;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        start;
  logic [22:0] dividend, quotient;
  logic [11:0] divisor, remainder;
  logic        busy, done;
  int          checks = 0, failures = 0;

  plkc_divider dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic div(input int unsigned n, input int unsigned d);
    int cycles = 0;
    dividend = 23'(n); divisor = 12'(d); start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    // a second start while busy must be ignored
    dividend = 23'(n ^ 23'h5a5a5); divisor = 12'(d + 1); start = 1'b1;
    while (!done) begin
      @(posedge clk); #1;
      start = 1'b0;
      cycles++;
    end
    checks += 2;
    if (quotient != 23'(n / d) || remainder != 12'(n % d)) begin
      failures++;
      $display("FAIL %0d / %0d: got q=%0d r=%0d", n, d, quotient, remainder);
    end
    if (cycles != 23) begin
      failures++;
      $display("FAIL latency %0d", cycles);
    end
  endtask

  initial begin
    start = 1'b0; dividend = '0; divisor = 12'd1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    div(187113, 3600);
    checks++;
    if (remainder != 12'd3513) failures++;
    div(4 * 3513, 225);
    checks++;
    if (quotient != 23'd62 || remainder != 12'd102) failures++;
    div(0, 3600);
    div(3599, 3600);
    div(3600, 3600);
    div(23'h7fffff, 3600);
    div(23'h7fffff, 1);
    div(14396, 225);
    div(2097152, 4095);
    for (int i = 0; i < 200; i++)
      div($urandom_range(0, 23'h7fffff), $urandom_range(1, 4095));
    for (int i = 0; i < 100; i++)
      div(4 * $urandom_range(0, 3599), 225);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
