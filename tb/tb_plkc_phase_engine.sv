// tb_plkc_phase_engine: checks the phase computation of all 32 TRMs.
//   - The original design's example (m = 17, PA* = 10944, PB* = 1065, no phase
//     error) must give the 32 phases recorded in its hardware capture, listed below.
//   - Random gradients of both signs, random m and random phase errors are
//     checked against an integer model of the algorithm.
//   - The run length without FIFO stalls must be 1 + 32*2*(23+3) clocks;
//     with an intermittently empty FIFO the engine must wait.
module tb_plkc_phase_engine;
  import plkc_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   start, busy, done;
  idx_t   plank_m;
  grad_t  pa, pb;
  phase_t perr_data;
  logic   perr_empty = 1'b1, perr_pop;
  phase_t phase_out [NUM_TRM];
  int     checks = 0, failures = 0;

  // FIFO model
  phase_t perr_q [$];
  bit     starve;         // when set, the FIFO looks empty on random cycles
  bit     hide;
  int     n_stall = 0, n_neg = 0, n_pos = 0, n_round = 0, n_wrap = 0;

  localparam int unsigned RUN_CLOCKS = 1 + NUM_TRM * 2 * (PROD_W + 3);

  // phases recorded in the original design's hardware capture, TRM 0..31
  localparam logic [5:0] FIG3 [32] = '{
    6'h3e, 6'h24, 6'h0a, 6'h30, 6'h16, 6'h3c, 6'h22, 6'h08,
    6'h2d, 6'h13, 6'h39, 6'h1f, 6'h05, 6'h2b, 6'h11, 6'h36,
    6'h1c, 6'h02, 6'h28, 6'h0e, 6'h34, 6'h1a, 6'h00, 6'h25,
    6'h0b, 6'h31, 6'h17, 6'h3d, 6'h23, 6'h09, 6'h2e, 6'h14};

  plkc_phase_engine dut (.*);

  always #5 clk = ~clk;

  // the FIFO outputs are refreshed between clock edges
  always @(negedge clk) begin
    perr_empty <= (perr_q.size() == 0) || hide;
    perr_data  <= (perr_q.size() != 0) ? perr_q[0] : '0;
  end

  always @(posedge clk) begin
    if (rst_n && perr_pop) void'(perr_q.pop_front());
    if (rst_n && busy && hide && dut.state == dut.S_COMP) n_stall++;
    hide <= starve && ($urandom_range(0, 2) == 0);
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  task automatic run(input int m, input int a, input int b, input bit use_fig);
    int e [NUM_TRM];
    int clocks = 0;
    for (int i = 0; i < NUM_TRM; i++) begin
      e[i] = use_fig ? 0 : $urandom_range(0, 63);
      perr_q.push_back(phase_t'(e[i]));
    end
    plank_m = idx_t'(m); pa = grad_t'(a); pb = grad_t'(b);
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    plank_m = '0; pa = '0; pb = '0;   // inputs are sampled at start only
    while (!done) begin
      @(posedge clk); #1;
      clocks++;
    end
    if (!starve) begin
      checks++;
      if (clocks != RUN_CLOCKS) begin
        failures++;
        $display("FAIL run took %0d clocks, expected %0d", clocks, RUN_CLOCKS);
      end
    end
    for (int k = 0; k < NUM_TRM; k++) begin
      int n = 1 + 2 * k;
      int prod = m * a + n * b;
      int exp_v = use_fig ? int'(FIG3[k]) : ref_phase(m, a, b, n, e[k]);
      int r = ((prod < 0) ? -prod : prod) % 3600;
      if (prod < 0) n_neg++; else n_pos++;
      if (prod < 0 && r != 0) r = 3600 - r;
      if (2 * ((4 * r) % 225) >= 225) n_round++;
      if (ref_phase(m, a, b, n, 0) == 0 && r > 3000) n_wrap++;
      checks++;
      if (phase_out[k] != phase_t'(exp_v)) begin
        failures++;
        $display("FAIL m=%0d PA=%0d PB=%0d TRM %0d: got %0h exp %0h", m, a, b, k, phase_out[k], exp_v);
      end
    end
    checks++;
    if (perr_q.size() != 0) begin failures++; $display("FAIL FIFO not drained"); end
  endtask

  initial begin
    start = 1'b0; plank_m = '0; pa = '0; pb = '0; starve = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run(17, 10944, 1065, 1'b1);
    run(0, 0, 0, 1'b0);
    run(63, -32768, -32768, 1'b0);
    run(63, 32767, 32767, 1'b0);
    run(1, -1, 0, 1'b0);
    for (int i = 0; i < 20; i++)
      run($urandom_range(0, 63), int'($signed(16'($urandom))), int'($signed(16'($urandom))), 1'b0);
    starve = 1'b1;
    for (int i = 0; i < 5; i++)
      run($urandom_range(0, 63), int'($signed(16'($urandom))), int'($signed(16'($urandom))), 1'b0);
    checks++;
    if (n_stall == 0 || n_neg == 0 || n_pos == 0 || n_round == 0 || n_wrap == 0) begin
      failures++;
      $display("FAIL coverage stall %0d neg %0d pos %0d round %0d wrap %0d", n_stall, n_neg, n_pos, n_round, n_wrap);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
