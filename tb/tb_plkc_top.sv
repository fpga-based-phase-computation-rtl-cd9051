// tb_plkc_top: end-to-end test of the plank controller at its full size.
// The testbench plays the beam steering unit (serial command frames at
// 50 Mbps), the external flash (behavioural model with random wait states)
// and the 32 TRMs (decoding their 20 Mbps data lines). For each beam it
// checks every phase received by every TRM against an integer model of the
// algorithm and against the phase registers, and checks the command-to-
// phases latency when flash is fast. The first beam is the original design's
// example (m = 17, PA* = 10944, PB* = 1065, zero phase errors), which must
// deliver the 32 phases recorded in its hardware capture.
// Mechanisms counted, each must occur: negative and positive phase products,
// rounding up, rounding that wraps 64 to 0, compensation wrapping past 63,
// the engine waiting for a slow flash, a malformed command frame and a
// command dropped because a beam is still being computed.
module tb_plkc_top;
  import plkc_pkg::*;

  logic               clk = 1'b0, rst_n = 1'b0;
  idx_t               plank_m;
  logic               cmd_sclk, cmd_cs_n, cmd_mosi;
  logic               flash_req, flash_ack;
  logic [FADDR_W-1:0] flash_addr;
  logic [FDATA_W-1:0] flash_data;
  logic               trm_sclk, trm_cs_n;
  logic [NUM_TRM-1:0] trm_mosi;
  phase_t             phase_out [NUM_TRM];
  logic               beam_busy, beam_done, cmd_frame_err, cmd_dropped;

  int checks = 0, failures = 0;
  int n_neg = 0, n_pos = 0, n_round = 0, n_wrap = 0, n_comp_wrap = 0;
  int n_stall = 0, n_frame_err = 0, n_dropped = 0, n_beams = 0;
  int max_wait = 0;

  localparam logic [5:0] FIG3 [32] = '{
    6'h3e, 6'h24, 6'h0a, 6'h30, 6'h16, 6'h3c, 6'h22, 6'h08,
    6'h2d, 6'h13, 6'h39, 6'h1f, 6'h05, 6'h2b, 6'h11, 6'h36,
    6'h1c, 6'h02, 6'h28, 6'h0e, 6'h34, 6'h1a, 6'h00, 6'h25,
    6'h0b, 6'h31, 6'h17, 6'h3d, 6'h23, 6'h09, 6'h2e, 6'h14};

  plkc_top dut (.*);

  // flash with wait states chosen per request from 0..max_wait
  logic [FDATA_W-1:0] fmem [1 << FADDR_W];
  initial begin
    flash_ack = 1'b0; flash_data = '0;
    forever begin
      @(posedge clk);
      if (flash_req && !flash_ack) begin
        repeat ($urandom_range(0, max_wait)) @(posedge clk);
        flash_ack  <= 1'b1;
        flash_data <= fmem[flash_addr];
        @(posedge clk);
        flash_ack  <= 1'b0;
      end
    end
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (cmd_frame_err) n_frame_err++;
    if (cmd_dropped) n_dropped++;
    // engine in its compensate step (state 7) with no phase error available
    if (int'(dut.u_engine.state) == 7 && dut.fifo_empty) n_stall++;
  end

  // TRM side: shift in on the rising link clock while frame select is low
  phase_t trm_rx [NUM_TRM];
  int     trm_bits = 0, trm_frames = 0;
  always @(negedge trm_cs_n) trm_bits = 0;
  always @(posedge trm_sclk) if (!trm_cs_n) begin
    for (int i = 0; i < NUM_TRM; i++) trm_rx[i] = {trm_rx[i][PHASE_W-2:0], trm_mosi[i]};
    trm_bits++;
  end
  always @(posedge trm_cs_n) if (rst_n) trm_frames++;

  // command link, 50 Mbps: data changes with the falling link clock
  task automatic send_bits(input logic [63:0] word, input int nbits);
    @(negedge clk); #2;
    cmd_cs_n = 1'b0;
    #10;
    for (int i = nbits - 1; i >= 0; i--) begin
      cmd_sclk = 1'b0;
      cmd_mosi = word[i];
      #10;
      cmd_sclk = 1'b1;
      #10;
    end
    cmd_sclk = 1'b0;
    #10;
    cmd_cs_n = 1'b1;
  endtask

  function automatic int ref_phase(int m, int a, int b, int n, int e);
    int prod = m * a + n * b;
    int r    = ((prod < 0) ? -prod : prod) % 3600;
    int q, rem;
    if (prod < 0 && r != 0) r = 3600 - r;
    q   = (4 * r) / 225;
    rem = (4 * r) % 225;
    if (2 * rem >= 225) q++;
    return (q + e) % 64;
  endfunction

  task automatic beam(input int a, input int b, input int unsigned base,
                      input bit fig, input bit timed, input bit disturb);
    int m = int'(plank_m);
    int e [NUM_TRM];
    int frames0 = trm_frames;
    int clocks = 0;
    cmd_t c, d;
    for (int i = 0; i < NUM_TRM; i++) begin
      e[i] = fig ? 0 : $urandom_range(0, 63);
      fmem[16'(base + i)] = {2'($urandom), 6'(e[i])};
    end
    c = '{pa: grad_t'(a), pb: grad_t'(b), flash_addr: FADDR_W'(base)};
    send_bits(64'(c), CMD_BITS);
    // from the end of the frame to the last TRM bit
    while (!beam_busy) begin @(posedge clk); clocks++; end
    if (disturb) begin
      // a second command while this beam is computed: dropped
      d = cmd_t'({$urandom, $urandom});
      send_bits(64'(d), CMD_BITS);
      // and a frame with a bit missing: rejected
      send_bits(64'(d), CMD_BITS - 1);
    end
    while (beam_busy) begin @(posedge clk); clocks++; end
    repeat (2) @(posedge clk);
    n_beams++;
    checks += 2;
    if (trm_frames != frames0 + 1 || trm_bits != PHASE_W) begin
      failures++;
      $display("FAIL link frames %0d bits %0d", trm_frames - frames0, trm_bits);
    end
    // 3 clocks command receiver, 1665 engine, 35 link frame; handshakes
    // add a few
    if (timed && (clocks < 1700 || clocks > 1712)) begin
      failures++;
      $display("FAIL command-to-link latency %0d clocks", clocks);
    end
    for (int k = 0; k < NUM_TRM; k++) begin
      int n = 1 + 2 * k;
      int prod = m * a + n * b;
      int r = ((prod < 0) ? -prod : prod) % 3600;
      int p0 = ref_phase(m, a, b, n, 0);
      int exp_v = fig ? int'(FIG3[k]) : ref_phase(m, a, b, n, e[k]);
      if (prod < 0) n_neg++; else n_pos++;
      if (prod < 0 && r != 0) r = 3600 - r;
      if (2 * ((4 * r) % 225) >= 225) n_round++;
      if (p0 == 0 && r > 3000) n_wrap++;
      if (p0 + e[k] >= 64) n_comp_wrap++;
      checks += 2;
      if (trm_rx[k] != phase_t'(exp_v)) begin
        failures++;
        $display("FAIL beam %0d TRM %0d: received %0h exp %0h", n_beams, k, trm_rx[k], exp_v);
      end
      if (phase_out[k] != phase_t'(exp_v)) begin
        failures++;
        $display("FAIL beam %0d phase_out[%0d] %0h exp %0h", n_beams, k, phase_out[k], exp_v);
      end
    end
  endtask

  initial begin
    cmd_sclk = 1'b0; cmd_cs_n = 1'b1; cmd_mosi = 1'b0;
    plank_m = idx_t'(17);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    beam(10944, 1065, 16'h0200, 1'b1, 1'b1, 1'b0);
    beam(-10944, 1065, 16'h0400, 1'b0, 1'b1, 1'b0);
    for (int i = 0; i < 6; i++) begin
      plank_m = idx_t'($urandom);
      beam(int'($signed(16'($urandom))), int'($signed(16'($urandom))), $urandom_range(0, 65535),
           1'b0, i != 2, i == 2);
    end
    // slow flash: the engine has to wait for phase errors
    max_wait = 120;
    for (int i = 0; i < 3; i++) begin
      plank_m = idx_t'($urandom);
      beam(int'($signed(16'($urandom))), int'($signed(16'($urandom))), $urandom_range(0, 65535),
           1'b0, 1'b0, 1'b0);
    end
    $display("beams %0d neg %0d pos %0d round %0d wrap %0d comp_wrap %0d stall %0d frame_err %0d dropped %0d",
             n_beams, n_neg, n_pos, n_round, n_wrap, n_comp_wrap, n_stall, n_frame_err, n_dropped);
    checks++;
    if (n_neg == 0 || n_pos == 0 || n_round == 0 || n_wrap == 0 || n_comp_wrap == 0 ||
        n_stall == 0 || n_frame_err != 1 || n_dropped != 1) begin
      failures++;
      $display("FAIL a mechanism did not occur as planned");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
