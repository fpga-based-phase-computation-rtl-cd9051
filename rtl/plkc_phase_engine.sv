// plkc_phase_engine: computes the 6-bit phase of every T/R module of a plank.
//
// Algorithm (original design's flow chart), for TRM k = 0..NUM_TRM-1 at position n_k:
//   1. product = m*PA* + n_k*PB*                 (signed, 23 bits)
//   2. r = |product| mod 3600; if product < 0 and r != 0 then r = 3600 - r
//   3. phase = (4*r) / 225, rounded to nearest, modulo 64
//   4. out_k = (phase + dphi_k) mod 64          (dphi_k from the phase error FIFO)
// Resources follow the original design: one multiplier and one divider shared by all
// TRMs. m*PA* is formed once per command; then for each TRM one multiply and
// the division by 3600 run and the corrected remainder is kept in a register
// per TRM. A second pass then runs the division by 225 for each TRM,
// compensates it and writes phase_out[k]; the outputs change one by one.
//
// This design's own choices, taken from the original design's recorded capture of 32
// computed phases (which they reproduce exactly): TRM k sits at n_k =
// N_FIRST + N_STEP*k = 1, 3, 5, ..., 63, and the quotient of the second
// division is rounded to nearest (remainder*2 >= 225 adds one) with 64
// wrapping to 0. ROUND_NEAREST = 0 gives plain truncation instead.
//
// Timing: start is taken when idle (the gradients and m are sampled then;
// m*PA* is formed right away, PB* is held for the run).
// Each TRM costs DIV_W + 3 = 26 clocks in each pass (divider 23 clocks plus
// issue, hand-over and multiply or compensate), so when the FIFO never runs
// dry done rises 1 + NTRM*2*(DIV_W + 3) = 1665 clocks after the edge that
// takes start: 16.65 us at 100 MHz for 32 TRMs. The second pass stalls
// while the FIFO is empty.
// done pulses once when the last phase is written.
module plkc_phase_engine
  import plkc_pkg::*;
#(
  parameter int unsigned NTRM          = NUM_TRM,
  parameter int unsigned N_FIRST       = 1,
  parameter int unsigned N_STEP        = 2,
  parameter bit          ROUND_NEAREST = 1'b1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  idx_t   plank_m,            // m: this plank controller's number
  input  grad_t  pa,                 // PA*
  input  grad_t  pb,                 // PB*
  output logic   busy,
  output logic   done,
  // phase error FIFO read side (first-word fall-through)
  input  phase_t perr_data,
  input  logic   perr_empty,
  output logic   perr_pop,
  // computed phases, one register per TRM
  output phase_t phase_out [NTRM]
);

  localparam int unsigned DIV_W  = PROD_W;
  localparam int unsigned DVS_W  = 12;
  localparam int unsigned R_W    = 12;      // remainder of /3600 fits 12 bits
  localparam int unsigned K_W    = (NTRM > 1) ? $clog2(NTRM) : 1;

  if (N_FIRST + N_STEP * (NTRM - 1) >= (1 << IDX_W)) begin : g_bad_n
    $error("TRM positions do not fit the %0d-bit n operand", IDX_W);
  end

  typedef enum logic [2:0] {
    S_IDLE, S_MUL_A, S_MUL_B, S_MUL_B_WAIT, S_DIV1_WAIT,
    S_DIV2, S_DIV2_WAIT, S_COMP
  } state_t;

  state_t          state;
  logic [K_W-1:0]  k;
  grad_t           pb_r;
  prod_t           pa_term;
  logic            neg_r;
  logic [R_W-1:0]  remd [NTRM];
  logic [PHASE_W-1:0] q_r;
  logic            up_r;

  // multiplier
  logic  mul_valid, mul_ovalid;
  grad_t mul_a;
  idx_t  mul_b;
  prod_t mul_p;

  // divider
  logic             div_start, div_busy, div_done;
  logic [DIV_W-1:0] div_dividend, div_q;
  logic [DVS_W-1:0] div_divisor, div_r;

  prod_t            product;
  logic [DIV_W-1:0] product_mag;
  logic [R_W-1:0]   r_fixed;
  logic             last_k;

  function automatic idx_t n_of(input logic [K_W-1:0] kk);
    return idx_t'(N_FIRST + N_STEP * int'(kk));
  endfunction

  plkc_mult u_mult (
    .clk, .rst_n,
    .in_valid (mul_valid),
    .a        (mul_a),
    .b        (mul_b),
    .out_valid(mul_ovalid),
    .p        (mul_p)
  );

  plkc_divider #(.DIVIDEND_W(DIV_W), .DIVISOR_W(DVS_W)) u_div (
    .clk, .rst_n,
    .start    (div_start),
    .dividend (div_dividend),
    .divisor  (div_divisor),
    .busy     (div_busy),
    .done     (div_done),
    .quotient (div_q),
    .remainder(div_r)
  );

  always_comb begin
    product     = pa_term + mul_p;
    product_mag = product[PROD_W-1] ? DIV_W'(-product) : DIV_W'(product);
    r_fixed     = (neg_r && div_r != '0) ? R_W'(MOD_DEG10) - div_r[R_W-1:0] : div_r[R_W-1:0];
    last_k      = (k == K_W'(NTRM - 1));

    mul_valid = 1'b0;
    mul_a     = pb_r;
    mul_b     = n_of(k);
    if (state == S_IDLE && start) begin
      mul_valid = 1'b1;
      mul_a     = pa;
      mul_b     = plank_m;
    end else if (state == S_MUL_B) begin
      mul_valid = 1'b1;
    end

    div_start    = 1'b0;
    div_dividend = product_mag;
    div_divisor  = DVS_W'(MOD_DEG10);
    if (state == S_MUL_B_WAIT && mul_ovalid) begin
      div_start = 1'b1;
    end else if (state == S_DIV2) begin
      div_start    = 1'b1;
      div_dividend = DIV_W'(remd[k]) * DIV_W'(Q_SCALE);
      div_divisor  = DVS_W'(Q_DIV);
    end

    perr_pop = (state == S_COMP) && !perr_empty;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      k       <= '0;
      pb_r    <= '0;
      pa_term <= '0;
      neg_r   <= 1'b0;
      q_r     <= '0;
      up_r    <= 1'b0;
      done    <= 1'b0;
      for (int i = 0; i < NTRM; i++) begin
        remd[i]      <= '0;
        phase_out[i] <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          pb_r  <= pb;
          k     <= '0;
          state <= S_MUL_A;
        end
        S_MUL_A: if (mul_ovalid) begin
          pa_term <= mul_p;
          state   <= S_MUL_B;
        end
        S_MUL_B: state <= S_MUL_B_WAIT;
        S_MUL_B_WAIT: if (mul_ovalid) begin
          neg_r <= product[PROD_W-1];
          state <= S_DIV1_WAIT;
        end
        S_DIV1_WAIT: if (div_done) begin
          remd[k] <= r_fixed;
          if (last_k) begin
            k     <= '0;
            state <= S_DIV2;
          end else begin
            k     <= k + 1'b1;
            state <= S_MUL_B;
          end
        end
        S_DIV2: state <= S_DIV2_WAIT;
        S_DIV2_WAIT: if (div_done) begin
          q_r   <= div_q[PHASE_W-1:0];
          up_r  <= ROUND_NEAREST && ({div_r, 1'b0} >= (DVS_W+1)'(Q_DIV));
          state <= S_COMP;
        end
        S_COMP: if (!perr_empty) begin
          phase_out[k] <= q_r + phase_t'(up_r) + perr_data;
          if (last_k) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            k     <= k + 1'b1;
            state <= S_DIV2;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // The quotient of 4*r/225 is below 64 because r < 3600.
  a_q_range: assert property (@(posedge clk) disable iff (!rst_n)
    state == S_DIV2_WAIT && div_done |-> div_q < DIV_W'(1 << PHASE_W));

endmodule
