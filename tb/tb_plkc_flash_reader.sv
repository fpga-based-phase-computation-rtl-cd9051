// tb_plkc_flash_reader: the reader fetches 32 words from a flash model with
// random wait states into a FIFO model that the testbench drains slowly, so
// the reader must also hold off while the FIFO is full. Checks the words,
// their order and addresses, the 6-bit truncation, and that done pulses
// once after exactly 32 reads.
module tb_plkc_flash_reader;
  import plkc_pkg::*;

  localparam int unsigned FIFO_DEPTH = 4;

  logic               clk = 1'b0, rst_n = 1'b0;
  logic               start, busy, done;
  logic [FADDR_W-1:0] base_addr;
  logic               flash_req, flash_ack;
  logic [FADDR_W-1:0] flash_addr;
  logic [FDATA_W-1:0] flash_data;
  logic               fifo_push, fifo_full;
  phase_t             fifo_data;
  int                 checks = 0, failures = 0;
  phase_t             q [$];
  int                 n_full_stall = 0, n_done = 0;

  plkc_flash_reader dut (.*);
  flash_model #(.AW(FADDR_W), .DW(FDATA_W), .MAX_WAIT(3)) u_flash (
    .clk, .req(flash_req), .addr(flash_addr), .ack(flash_ack), .data(flash_data));

  always #5 clk = ~clk;

  assign fifo_full = (q.size() >= FIFO_DEPTH);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // FIFO model: take pushes, let the checker drain it slowly
  always @(posedge clk) if (rst_n) begin
    if (done) n_done++;
    if (fifo_full && busy && !flash_req) n_full_stall++;
    if (fifo_push) begin
      if (fifo_full) begin
        failures++;
        $display("FAIL push into a full FIFO");
      end
      q.push_back(fifo_data);
    end
  end

  task automatic run(input int unsigned base);
    int got = 0;
    n_done = 0;
    for (int i = 0; i < 32; i++) u_flash.mem[16'(base + i)] = 8'($urandom);
    u_flash.reads = 0;
    base_addr = FADDR_W'(base);
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    while (got < 32) begin
      repeat ($urandom_range(2, 12)) @(posedge clk);
      #1;
      if (q.size() != 0) begin
        phase_t v = q.pop_front();
        checks++;
        if (v != u_flash.mem[16'(base + got)][5:0]) begin
          failures++;
          $display("FAIL word %0d: got %0h exp %0h", got, v, u_flash.mem[16'(base + got)][5:0]);
        end
        got++;
      end
    end
    repeat (10) @(posedge clk);
    checks += 3;
    if (u_flash.reads != 32) begin failures++; $display("FAIL reads %0d", u_flash.reads); end
    if (n_done != 1) begin failures++; $display("FAIL done count %0d", n_done); end
    if (busy) begin failures++; $display("FAIL still busy"); end
  endtask

  initial begin
    start = 1'b0; base_addr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run(16'h0100);
    run(16'hffe8);   // wraps around the top of the address space
    run(16'h0000);
    checks++;
    if (n_full_stall == 0) begin failures++; $display("FAIL FIFO-full stall never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
