// tb_plkc_perr_fifo: checks the phase error FIFO against a queue model under
// random push/pop traffic, including writes when full and reads when empty
// (both ignored), the flags, the count and flush.
module tb_plkc_perr_fifo;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       flush, push, pop;
  logic [5:0] wr_data, rd_data;
  logic       full, empty;
  logic [5:0] count;
  int         checks = 0, failures = 0;
  logic [5:0] model [$];
  int         n_full = 0, n_empty = 0;

  plkc_perr_fifo dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    checks++;
    if (count != 6'(model.size()) || empty != (model.size() == 0) ||
        full != (model.size() == 32) ||
        (model.size() != 0 && rd_data != model[0])) begin
      failures++;
      $display("FAIL size %0d count %0d empty %0b full %0b rd %0h", model.size(), count, empty, full, rd_data);
    end
  endtask

  initial begin
    flush = 1'b0; push = 1'b0; pop = 1'b0; wr_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    compare();
    for (int phase = 0; phase < 3; phase++) begin
      for (int i = 0; i < 1500; i++) begin
        // phase 0 fills, phase 1 drains, phase 2 mixes
        push    = (phase == 0) ? ($urandom_range(0, 3) != 0) :
                  (phase == 1) ? ($urandom_range(0, 3) == 0) : $urandom_range(0, 1);
        pop     = (phase == 0) ? ($urandom_range(0, 3) == 0) :
                  (phase == 1) ? ($urandom_range(0, 3) != 0) : $urandom_range(0, 1);
        wr_data = 6'($urandom);
        @(posedge clk); #1;
        begin
          bit did_pop, did_push;
          did_pop  = pop && model.size() != 0;
          did_push = push && model.size() != 32;
          if (model.size() == 32) n_full++;
          if (model.size() == 0) n_empty++;
          if (did_pop) void'(model.pop_front());
          if (did_push) model.push_back(wr_data);
        end
        push = 1'b0; pop = 1'b0;
        compare();
      end
    end
    flush = 1'b1;
    push  = 1'b1;
    @(posedge clk); #1;
    flush = 1'b0; push = 1'b0;
    model.delete();
    compare();
    checks++;
    if (n_full == 0 || n_empty == 0) begin
      failures++;
      $display("FAIL full/empty never reached");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
