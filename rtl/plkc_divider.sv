// plkc_divider: the shared sequential divider of the plank controller.
//
// Unsigned restoring division, one quotient bit per clock. The PLKC owns one
// instance and uses it for both divisions of every TRM: the phase product
// magnitude by 3600 (remainder kept) and four times that remainder by 225
// (quotient kept). The original design says a single divider is shared and that its
// dividend is 23 bits wide; it does not describe how its divider works, so
// this is the plain shift-and-subtract form.
//
// Interface: pulse start with dividend and divisor; both are captured. After
// DIVIDEND_W clocks done pulses for one cycle with quotient and remainder
// valid; they hold until the next start. busy is high in between; a start
// while busy is ignored. divisor must not be zero.
module plkc_divider #(
  parameter int unsigned DIVIDEND_W = 23,
  parameter int unsigned DIVISOR_W  = 12
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [DIVIDEND_W-1:0] dividend,
  input  logic [DIVISOR_W-1:0]  divisor,
  output logic                  busy,
  output logic                  done,
  output logic [DIVIDEND_W-1:0] quotient,
  output logic [DIVISOR_W-1:0]  remainder
);

  localparam int unsigned CNT_W = $clog2(DIVIDEND_W + 1);

  logic [DIVIDEND_W-1:0] q_sh;   // dividend bits shift out at the top, quotient bits in at the bottom
  logic [DIVISOR_W-1:0]  rem;
  logic [DIVISOR_W-1:0]  dvs;
  logic [CNT_W-1:0]      cnt;

  // One restoring step: bring in the next dividend bit and try the subtraction.
  logic [DIVISOR_W:0]    trial;
  logic [DIVISOR_W:0]    diff;
  logic                  fits;

  always_comb begin
    trial = {rem, q_sh[DIVIDEND_W-1]};
    diff  = trial - {1'b0, dvs};
    fits  = (trial >= {1'b0, dvs});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      q_sh <= '0;
      rem  <= '0;
      dvs  <= '0;
      cnt  <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          q_sh <= dividend;
          rem  <= '0;
          dvs  <= divisor;
          cnt  <= CNT_W'(DIVIDEND_W);
        end
      end else begin
        rem  <= fits ? diff[DIVISOR_W-1:0] : trial[DIVISOR_W-1:0];
        q_sh <= {q_sh[DIVIDEND_W-2:0], fits};
        cnt  <= cnt - 1'b1;
        if (cnt == CNT_W'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quotient  = q_sh;
  assign remainder = rem;

endmodule
