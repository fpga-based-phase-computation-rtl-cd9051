// plkc_top: plank controller (PLKC) of an active phased array beam steering
// controller.
//
// One PLKC drives NUM_TRM = 32 T/R modules. Per beam command it:
//   1. receives PA*, PB* (16-bit phase gradients x 10) and a flash address on
//      the serial command link from the beam steering unit (plkc_cmd_rx);
//   2. reads the 32 stored phase errors from external flash into a FIFO
//      (plkc_flash_reader, plkc_perr_fifo), in parallel with step 3;
//   3. computes each TRM's 6-bit phase with one shared multiplier and one
//      shared divider, and compensates it with its phase error
//      (plkc_phase_engine);
//   4. sends the 32 phases to the TRMs on the 20 Mbps link (plkc_trm_tx).
// The chain and its arithmetic follow the original design; link framing, the flash
// read port and the handling of a command that arrives while a beam is still
// being computed (it is dropped and cmd_dropped pulses) are this design's own.
//
// Interface: plank_m is this controller's number m (a board strap). The
// phase registers are also brought out as phase_out for observation. Link
// signals are single-ended here; the LVDS buffers sit outside.
// Timing at 100 MHz: about 3 clocks from the end of a command frame to the
// engine start, 1665 clocks of computation when flash keeps up, then one
// 35-clock link frame: about 17 us from command to the last TRM bit.
module plkc_top
  import plkc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  idx_t               plank_m,
  // command link from the beam steering unit
  input  logic               cmd_sclk,
  input  logic               cmd_cs_n,
  input  logic               cmd_mosi,
  // external flash read port
  output logic               flash_req,
  output logic [FADDR_W-1:0] flash_addr,
  input  logic               flash_ack,
  input  logic [FDATA_W-1:0] flash_data,
  // link to the T/R modules
  output logic               trm_sclk,
  output logic               trm_cs_n,
  output logic [NUM_TRM-1:0] trm_mosi,
  // status and observation
  output phase_t             phase_out [NUM_TRM],
  output logic               beam_busy,
  output logic               beam_done,
  output logic               cmd_frame_err,
  output logic               cmd_dropped
);

  cmd_t   cmd;
  logic   cmd_valid, accept;
  logic   eng_busy, eng_done;
  logic   rd_busy, rd_done;
  logic   fifo_push, fifo_pop, fifo_full, fifo_empty;
  phase_t fifo_wdata, fifo_rdata;
  logic   tx_busy;
  logic [$clog2(NUM_TRM):0] fifo_count;

  assign accept      = cmd_valid && !eng_busy;
  assign cmd_dropped = cmd_valid && eng_busy;
  assign beam_busy   = eng_busy || eng_done || tx_busy;
  assign beam_done   = eng_done;

  plkc_cmd_rx u_cmd_rx (
    .clk, .rst_n,
    .link_sclk (cmd_sclk),
    .link_cs_n (cmd_cs_n),
    .link_mosi (cmd_mosi),
    .cmd       (cmd),
    .cmd_valid (cmd_valid),
    .frame_err (cmd_frame_err)
  );

  plkc_flash_reader #(.NUM_WORDS(NUM_TRM)) u_flash_rd (
    .clk, .rst_n,
    .start      (accept),
    .base_addr  (cmd.flash_addr),
    .busy       (rd_busy),
    .done       (rd_done),
    .flash_req,
    .flash_addr,
    .flash_ack,
    .flash_data,
    .fifo_push  (fifo_push),
    .fifo_data  (fifo_wdata),
    .fifo_full  (fifo_full)
  );

  plkc_perr_fifo #(.WIDTH(PHASE_W), .DEPTH(NUM_TRM)) u_perr_fifo (
    .clk, .rst_n,
    .flush   (accept),
    .push    (fifo_push),
    .wr_data (fifo_wdata),
    .pop     (fifo_pop),
    .rd_data (fifo_rdata),
    .full    (fifo_full),
    .empty   (fifo_empty),
    .count   (fifo_count)
  );

  plkc_phase_engine #(.NTRM(NUM_TRM)) u_engine (
    .clk, .rst_n,
    .start      (accept),
    .plank_m    (plank_m),
    .pa         (cmd.pa),
    .pb         (cmd.pb),
    .busy       (eng_busy),
    .done       (eng_done),
    .perr_data  (fifo_rdata),
    .perr_empty (fifo_empty),
    .perr_pop   (fifo_pop),
    .phase_out  (phase_out)
  );

  plkc_trm_tx #(.NTRM(NUM_TRM), .CLK_DIV(5)) u_trm_tx (
    .clk, .rst_n,
    .load     (eng_done),
    .phases   (phase_out),
    .busy     (tx_busy),
    .trm_sclk,
    .trm_cs_n,
    .trm_mosi
  );

endmodule
