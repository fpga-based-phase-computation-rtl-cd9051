// plkc_pkg: constants and types shared by the plank controller (PLKC) blocks.
//
// The PLKC turns two 16-bit phase gradients PA* and PB* (both already scaled
// by 10, so one unit is 0.1 degree) into one 6-bit phase word per T/R module:
//   product = m*PA* + n*PB*            (m = plank number, n = TRM position)
//   r       = product mod 3600         (0..3599 tenths of a degree)
//   phase   = round(4*r / 225) mod 64  (5.625 degree steps)
//   out     = (phase + dphi) mod 64    (dphi = phase error read from flash)
// The widths, 3600, 4 and 225 and the count of 32 TRMs follow the original design;
// the rounding step and the TRM position rule n = 1 + 2*k were worked back
// from its recorded hardware capture of 32 computed phases.
package plkc_pkg;

  localparam int unsigned GRAD_W    = 16;   // phase gradient width (PA*, PB*)
  localparam int unsigned IDX_W     = 6;    // m and n width (16x6 multiplication)
  localparam int unsigned PROD_W    = 23;   // phase product width
  localparam int unsigned PHASE_W   = 6;    // phase shifter bits
  localparam int unsigned NUM_TRM   = 32;   // T/R modules per plank controller
  localparam int unsigned MOD_DEG10 = 3600; // 360.0 degrees in tenths
  localparam int unsigned Q_SCALE   = 4;    // numerator scale of the second division
  localparam int unsigned Q_DIV     = 225;  // 4 * 56.25 tenths of a degree per LSB
  localparam int unsigned FADDR_W   = 16;   // flash word address width
  localparam int unsigned FDATA_W   = 8;    // flash data width (phase error uses 6 bits)

  typedef logic signed [GRAD_W-1:0]  grad_t;
  typedef logic        [IDX_W-1:0]   idx_t;
  typedef logic signed [PROD_W-1:0]  prod_t;
  typedef logic        [PHASE_W-1:0] phase_t;

  // Command carried by one serial frame from the beam steering unit, sent
  // MSB first: PA*, then PB*, then the flash address.
  typedef struct packed {
    grad_t              pa;         // PA* (azimuth gradient x 10), sent first
    grad_t              pb;         // PB* (elevation gradient x 10)
    logic [FADDR_W-1:0] flash_addr; // first flash address of this beam's phase errors
  } cmd_t;

  localparam int unsigned CMD_BITS = $bits(cmd_t);

endpackage
