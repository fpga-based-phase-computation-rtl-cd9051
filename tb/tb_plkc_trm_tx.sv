// tb_plkc_trm_tx: decodes all 32 TRM data lines on the rising link clock
// while frame select is low and compares each received 6-bit value with the
// loaded one. Checks the bit period (5 system clocks = 20 Mbps at 100 MHz),
// the frame length and that a load during a frame is sent afterwards.
module tb_plkc_trm_tx;
  import plkc_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        load, busy, trm_sclk, trm_cs_n;
  phase_t      phases [NUM_TRM];
  logic [31:0] trm_mosi;
  int          checks = 0, failures = 0;

  phase_t      rx [NUM_TRM];
  int          rx_bits = 0, frames = 0;
  int          cyc = 0, last_rise = -1, cs_fall = 0;
  phase_t      expect_q [$][NUM_TRM];

  plkc_trm_tx dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc++;

  always @(negedge trm_cs_n) begin
    rx_bits = 0;
    cs_fall = cyc;
    last_rise = -1;
  end

  always @(posedge trm_sclk) begin
    if (!trm_cs_n) begin
      if (last_rise >= 0) begin
        checks++;
        if (cyc - last_rise != 5) begin failures++; $display("FAIL bit period %0d", cyc - last_rise); end
      end
      last_rise = cyc;
      for (int i = 0; i < NUM_TRM; i++) rx[i] = {rx[i][4:0], trm_mosi[i]};
      rx_bits++;
    end
  end

  always @(posedge trm_cs_n) begin
    if (rst_n) begin
      frames++;
      checks += 2;
      if (rx_bits != 6) begin failures++; $display("FAIL %0d bits", rx_bits); end
      if (cyc - cs_fall != 30) begin failures++; $display("FAIL frame %0d clocks", cyc - cs_fall); end
      if (expect_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected frame");
      end else begin
        for (int i = 0; i < NUM_TRM; i++) begin
          checks++;
          if (rx[i] != expect_q[0][i]) begin
            failures++;
            $display("FAIL TRM %0d got %0h exp %0h", i, rx[i], expect_q[0][i]);
          end
        end
        void'(expect_q.pop_front());
      end
    end
  end

  task automatic new_phases();
    for (int i = 0; i < NUM_TRM; i++) phases[i] = phase_t'($urandom);
  endtask

  initial begin
    load = 1'b0;
    new_phases();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int f = 0; f < 10; f++) begin
      new_phases();
      expect_q.push_back(phases);
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      // half the time, load again during the frame: it is sent afterwards
      // with the phases present when the first frame ends
      if (f % 2 == 1) begin
        repeat (10) @(negedge clk);
        load = 1'b1;
        @(negedge clk);
        load = 1'b0;
        new_phases();
        expect_q.push_back(phases);
      end
      while (busy) @(negedge clk);
      repeat ($urandom_range(0, 8)) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    checks++;
    if (frames != 15 || expect_q.size() != 0) begin
      failures++;
      $display("FAIL frames %0d left %0d", frames, expect_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
