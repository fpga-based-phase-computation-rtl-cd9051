// plkc_flash_reader: fetches the phase error values from the external flash.
//
// The phase error dphi of each TRM is stored in flash in advance. When the
// radar controller's command arrives, this block reads NUM_WORDS consecutive
// words starting at the address the command gives, keeps the low PHASE_W
// bits of each (the error is at most 6 bits) and pushes them into the phase
// error FIFO, in TRM order. That much follows the original design; the flash bus is
// this design's own: a request/acknowledge read port in front of whatever
// flash device and controller the board uses.
//
// Flash port: flash_req rises with flash_addr and both hold until the cycle
// in which flash_ack is high; flash_data is valid in that cycle. A new request
// is only issued when the FIFO has room. start is accepted when idle; busy
// stays high until the last word is pushed, then done pulses once.
module plkc_flash_reader
  import plkc_pkg::*;
#(
  parameter int unsigned NUM_WORDS = NUM_TRM
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [FADDR_W-1:0] base_addr,
  output logic               busy,
  output logic               done,
  // flash read port
  output logic               flash_req,
  output logic [FADDR_W-1:0] flash_addr,
  input  logic               flash_ack,
  input  logic [FDATA_W-1:0] flash_data,
  // FIFO write side
  output logic               fifo_push,
  output phase_t             fifo_data,
  input  logic               fifo_full
);

  localparam int unsigned CNT_W = $clog2(NUM_WORDS + 1);

  logic [CNT_W-1:0] left;     // words still to read

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      done       <= 1'b0;
      flash_req  <= 1'b0;
      flash_addr <= '0;
      left       <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy       <= 1'b1;
          flash_addr <= base_addr;
          left       <= CNT_W'(NUM_WORDS);
        end
      end else if (flash_req) begin
        if (flash_ack) begin
          flash_req  <= 1'b0;
          flash_addr <= flash_addr + 1'b1;
          left       <= left - 1'b1;
          if (left == CNT_W'(1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end else if (!fifo_full) begin
        flash_req <= 1'b1;
      end
    end
  end

  assign fifo_push = flash_req && flash_ack;
  assign fifo_data = flash_data[PHASE_W-1:0];

  // Read port rule: a request holds its address until it is acknowledged.
  a_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
    flash_req && !flash_ack |=> flash_req && $stable(flash_addr));

endmodule
