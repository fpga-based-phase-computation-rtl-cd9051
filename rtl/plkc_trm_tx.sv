// plkc_trm_tx: sends the computed 6-bit phases to the T/R modules.
//
// The PLKC broadcasts the phase values to its 32 TRMs at 20 Mbps over an
// SPI-style link (carried on LVDS pairs outside this module). The original design
// gives the rate, the SPI style and the 6-bit values; the frame is this
// design's own: one shared link clock and active-low frame select for all
// TRMs and one data line per TRM, so all 32 values go out in parallel in one
// 6-bit frame, MSB first.
//
// Timing: each bit lasts CLK_DIV system clocks (5 at 100 MHz gives 20 Mbps).
// The data line changes at the start of a bit with the link clock low; the
// link clock rises CLK_DIV - CLK_DIV/2 clocks later, where the TRM samples,
// and falls at the end of the bit. Frame select goes low with the first bit
// and high after the last, followed by a gap of CLK_DIV clocks. A frame takes
// (PHASE_W + 1) * CLK_DIV = 35 clocks (350 ns at 100 MHz).
// A load pulse while idle copies phases into the shift registers at once; a
// load while busy is remembered (one deep) and starts the next frame from the
// phases as they are when the current frame ends.
module plkc_trm_tx
  import plkc_pkg::*;
#(
  parameter int unsigned NTRM    = NUM_TRM,
  parameter int unsigned CLK_DIV = 5
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load,
  input  phase_t          phases [NTRM],
  output logic            busy,
  output logic            trm_sclk,
  output logic            trm_cs_n,
  output logic [NTRM-1:0] trm_mosi
);

  localparam int unsigned LOW   = CLK_DIV - CLK_DIV / 2;  // clocks with link clock low
  localparam int unsigned CYC_W = $clog2(CLK_DIV + 1);
  localparam int unsigned BIT_W = $clog2(PHASE_W);

  typedef enum logic [1:0] {T_IDLE, T_SHIFT, T_GAP} tstate_t;

  tstate_t          state;
  logic [CYC_W-1:0] cyc;
  logic [BIT_W-1:0] bitn;
  logic             pending;
  phase_t           sh [NTRM];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= T_IDLE;
      cyc      <= '0;
      bitn     <= '0;
      pending  <= 1'b0;
      trm_sclk <= 1'b0;
      trm_cs_n <= 1'b1;
      for (int i = 0; i < NTRM; i++) sh[i] <= '0;
    end else begin
      if (load && state != T_IDLE) pending <= 1'b1;
      unique case (state)
        T_IDLE: if (load || pending) begin
          for (int i = 0; i < NTRM; i++) sh[i] <= phases[i];
          pending  <= 1'b0;
          trm_cs_n <= 1'b0;
          cyc      <= '0;
          bitn     <= '0;
          state    <= T_SHIFT;
        end
        T_SHIFT: begin
          cyc <= cyc + 1'b1;
          if (cyc == CYC_W'(LOW - 1)) trm_sclk <= 1'b1;
          if (cyc == CYC_W'(CLK_DIV - 1)) begin
            trm_sclk <= 1'b0;
            cyc      <= '0;
            if (bitn == BIT_W'(PHASE_W - 1)) begin
              trm_cs_n <= 1'b1;
              state    <= T_GAP;
            end else begin
              bitn <= bitn + 1'b1;
              for (int i = 0; i < NTRM; i++) sh[i] <= {sh[i][PHASE_W-2:0], 1'b0};
            end
          end
        end
        T_GAP: begin
          cyc <= cyc + 1'b1;
          if (cyc == CYC_W'(CLK_DIV - 1)) state <= T_IDLE;
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  always_comb begin
    for (int i = 0; i < NTRM; i++) trm_mosi[i] = sh[i][PHASE_W-1];
  end

  assign busy = (state != T_IDLE) || pending;

endmodule
