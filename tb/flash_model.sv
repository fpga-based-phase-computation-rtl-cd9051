// flash_model: behavioural model of the external phase error flash, for
// testbenches only (not synthesizable intent, no timing of a real device).
// It answers the PLKC's request/acknowledge read port: after a random wait
// of 0..MAX_WAIT clocks it raises ack for one clock with mem[addr] on data.
// Testbenches fill mem directly.
module flash_model #(
  parameter int unsigned AW       = 16,
  parameter int unsigned DW       = 8,
  parameter int unsigned MAX_WAIT = 4
) (
  input  logic          clk,
  input  logic          req,
  input  logic [AW-1:0] addr,
  output logic          ack,
  output logic [DW-1:0] data
);
  logic [DW-1:0] mem [1 << AW];
  int            reads = 0;
  int            waits = 0;

  initial begin
    ack  = 1'b0;
    data = '0;
    forever begin
      @(posedge clk);
      if (req && !ack) begin
        int w = $urandom_range(0, MAX_WAIT);
        waits += w;
        repeat (w) @(posedge clk);
        ack  <= 1'b1;
        data <= mem[addr];
        reads++;
        @(posedge clk);
        ack  <= 1'b0;
      end
    end
  end
endmodule
