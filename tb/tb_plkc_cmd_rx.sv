// tb_plkc_cmd_rx: drives the serial command link at 50 Mbps (link clock
// toggling every 10 ns against a 100 MHz system clock, with a phase offset)
// and checks the decoded PA*, PB* and flash address, that cmd_valid pulses
// once per good frame, and that short and long frames raise frame_err and
// leave the registers unchanged.
module tb_plkc_cmd_rx;
  import plkc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic link_sclk, link_cs_n, link_mosi;
  cmd_t cmd;
  logic cmd_valid, frame_err;
  int   checks = 0, failures = 0;
  int   n_valid = 0, n_err = 0;

  plkc_cmd_rx dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (cmd_valid) n_valid++;
    if (frame_err) n_err++;
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Send nbits of word (MSB first); data changes with the falling link clock.
  task automatic send(input logic [63:0] word, input int nbits);
    #3;
    link_cs_n = 1'b0;
    #10;
    for (int i = nbits - 1; i >= 0; i--) begin
      link_sclk = 1'b0;
      link_mosi = word[i];
      #10;
      link_sclk = 1'b1;
      #10;
    end
    link_sclk = 1'b0;
    #10;
    link_cs_n = 1'b1;
    #60;
  endtask

  initial begin
    cmd_t c, prev;
    link_sclk = 1'b0; link_cs_n = 1'b1; link_mosi = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    // the original design's example gradients
    c = '{pa: grad_t'(16'h2ac0), pb: grad_t'(16'h0429), flash_addr: 16'h0040};
    send(64'(c), CMD_BITS);
    checks += 2;
    if (cmd != c) begin failures++; $display("FAIL cmd %h exp %h", cmd, c); end
    if (n_valid != 1) begin failures++; $display("FAIL n_valid %0d", n_valid); end
    for (int i = 0; i < 40; i++) begin
      c = cmd_t'({$urandom, $urandom});
      send(64'(c), CMD_BITS);
      checks++;
      if (cmd != c) begin failures++; $display("FAIL cmd %h exp %h", cmd, c); end
    end
    checks++;
    if (n_valid != 41 || n_err != 0) begin failures++; $display("FAIL counts %0d %0d", n_valid, n_err); end
    // malformed frames
    prev = cmd;
    send(64'($urandom), CMD_BITS - 1);
    send({$urandom, $urandom}, CMD_BITS + 5);
    send(64'h0, 0);
    checks += 2;
    if (cmd != prev) begin failures++; $display("FAIL cmd changed by a bad frame"); end
    if (n_err != 3 || n_valid != 41) begin failures++; $display("FAIL err count %0d valid %0d", n_err, n_valid); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
