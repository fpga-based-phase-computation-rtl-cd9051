// tb_plkc_mult: checks the 16x6 multiplier against integer products,
// including the original design's worked example 17 * 10944 = 186048, the extremes
// of the signed gradient and back-to-back inputs (one result per clock,
// latency one clock).
module tb_plkc_mult;
  import plkc_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid;
  grad_t a;
  idx_t  b;
  logic  out_valid;
  prod_t p;
  int    checks = 0, failures = 0;

  plkc_mult dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input int av, input int bv);
    int exp_p;
    a = grad_t'(av); b = idx_t'(bv); in_valid = 1'b1;
    @(posedge clk); #1;
    in_valid = 1'b0;
    exp_p = av * bv;
    checks++;
    if (!out_valid || int'(p) != exp_p) begin
      failures++;
      $display("FAIL %0d * %0d: got %0d valid %0b", av, bv, p, out_valid);
    end
  endtask

  initial begin
    in_valid = 1'b0; a = '0; b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check_one(10944, 17);
    check_one(1065, 1);
    check_one(-32768, 63);
    check_one(32767, 63);
    check_one(-1, 1);
    check_one(12345, 0);
    for (int i = 0; i < 300; i++)
      check_one(int'($signed(16'($urandom))), int'($urandom_range(0, 63)));
    // pipelining: a new operand every clock, results one clock later
    begin
      int av [4] = '{100, -200, 3000, -4000};
      int bv [4] = '{1, 5, 33, 63};
      for (int i = 0; i < 4; i++) begin
        a = grad_t'(av[i]); b = idx_t'(bv[i]); in_valid = 1'b1;
        @(posedge clk); #1;
        checks++;
        if (!out_valid || int'(p) != av[i] * bv[i]) failures++;
      end
      in_valid = 1'b0;
      @(posedge clk); #1;
      checks++;
      if (out_valid) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
