// plkc_perr_fifo: FIFO for the phase error values read from flash.
//
// The flash reader pushes one phase error (at most 6 bits) per TRM in TRM
// order; the phase engine pops one per TRM when it compensates that TRM's
// phase. Synchronous single-clock FIFO on a register array with read and
// write pointers one bit wider than the address. The original design names a FIFO
// for this purpose; depth, width and the show-ahead read are this design's
// choice (DEPTH = one entry per TRM).
//
// Interface: push is ignored when full, pop when empty. rd_data always shows
// the oldest entry (first-word fall-through); pop removes it at the clock
// edge. flush empties the FIFO. count is the number of entries held.
// DEPTH must be a power of two.
module plkc_perr_fifo #(
  parameter int unsigned WIDTH = 6,
  parameter int unsigned DEPTH = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     flush,
  input  logic                     push,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic                     pop,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     full,
  output logic                     empty,
  output logic [$clog2(DEPTH):0]   count
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wp, rp;
  logic             do_push, do_pop;

  assign count   = wp - rp;
  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = (wp == rp);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign rd_data = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_push) mem[wp[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else if (flush) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (do_push) wp <= wp + 1'b1;
      if (do_pop)  rp <= rp + 1'b1;
    end
  end

endmodule
