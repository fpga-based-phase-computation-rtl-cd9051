// plkc_mult: the single 16x6 multiplier of the plank controller.
//
// Multiplies a signed 16-bit phase gradient (PA* or PB*) by an unsigned 6-bit
// plank or TRM number and gives the signed 23-bit phase product term. The
// original design uses one vendor multiplier core for both multiplications and
// states a 23-bit output; this module is a plain registered multiplier that
// stands in for that core.
//
// Interface: present a, b with in_valid; p and out_valid appear one clock
// later (fixed latency of 1 cycle, fully pipelined). out_valid resets low.
module plkc_mult
  import plkc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  grad_t a,          // signed gradient
  input  idx_t  b,          // unsigned plank / TRM number
  output logic  out_valid,
  output prod_t p           // a * b, sign extended to PROD_W bits
);

  prod_t prod_c;

  always_comb prod_c = PROD_W'(a) * $signed({1'b0, b});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      p         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) p <= prod_c;
    end
  end

endmodule
