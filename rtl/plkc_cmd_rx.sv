// plkc_cmd_rx: serial command receiver and phase gradient registers.
//
// The beam steering unit sends the PLKC a source-synchronous serial frame at
// 50 Mbps carrying the two 16-bit phase gradients PA* and PB*; the PLKC keeps
// them in 16-bit registers (first step of the algorithm). The original design gives
// the rate and the 16-bit gradients; the framing is this design's own: an
// SPI-like link with a clock, an active-low frame select and one data line,
// data sampled on the rising link clock, MSB first, one frame = PA*, PB*,
// then a 16-bit flash address (see plkc_pkg::cmd_t).
//
// All three link signals are brought into the 100 MHz system clock through
// two-flop synchronisers and the link clock is edge-detected, so the link
// clock must run at no more than half the system clock (50 MHz at 100 MHz,
// as in the original design) with each level held for at least one system clock.
// When the frame select rises after exactly CMD_BITS bits, cmd is updated and
// cmd_valid pulses one cycle (about 3 clocks after the frame ends); a frame of
// any other length leaves cmd alone and pulses frame_err instead.
module plkc_cmd_rx
  import plkc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic link_sclk,
  input  logic link_cs_n,
  input  logic link_mosi,
  output cmd_t cmd,
  output logic cmd_valid,
  output logic frame_err
);

  localparam int unsigned CNT_W = $clog2(CMD_BITS + 2);

  logic [2:0] sclk_s, cs_s;     // synchroniser stages plus one for edge detection
  logic [1:0] mosi_s;
  logic [CMD_BITS-1:0] shreg;
  logic [CNT_W-1:0]    nbits;   // saturates at CMD_BITS+1

  logic sclk_rise, cs_rise, in_frame;

  assign sclk_rise = sclk_s[1] && !sclk_s[2];
  assign cs_rise   = cs_s[1] && !cs_s[2];
  assign in_frame  = !cs_s[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s    <= '0;
      cs_s      <= '1;
      mosi_s    <= '0;
      shreg     <= '0;
      nbits     <= '0;
      cmd       <= '0;
      cmd_valid <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      sclk_s    <= {sclk_s[1:0], link_sclk};
      cs_s      <= {cs_s[1:0], link_cs_n};
      mosi_s    <= {mosi_s[0], link_mosi};
      cmd_valid <= 1'b0;
      frame_err <= 1'b0;
      if (in_frame && sclk_rise) begin
        shreg <= {shreg[CMD_BITS-2:0], mosi_s[1]};
        if (nbits != CNT_W'(CMD_BITS + 1)) nbits <= nbits + 1'b1;
      end
      if (cs_rise) begin
        nbits <= '0;
        if (nbits == CNT_W'(CMD_BITS)) begin
          cmd       <= cmd_t'(shreg);
          cmd_valid <= 1'b1;
        end else begin
          frame_err <= 1'b1;
        end
      end
    end
  end

endmodule
