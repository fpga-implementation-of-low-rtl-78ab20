// Memory of a processing element: INIT RAM (intrinsic messages), RAM 1-3
// (messages exchanged with the three neighbouring check node groups) and
// DEC RAM (decoded bits) are all instances of this block.
//
// DEPTH words of W bits, one write port and one read port on one clock. The
// write takes effect at the clock edge; the read is synchronous, rdata shows
// the word addressed in the previous cycle, and a read of the address being
// written in the same cycle returns the old word. Word d-1 holds the messages
// of variable node d of the group. The contents are not reset: the decoder
// writes every word it reads first.
//
// The source design reads and writes each block RAM in one decoder cycle by
// clocking it at twice the decoder clock; a separate read and write port is
// this design's equivalent of that arrangement.
module ldpc_ram #(
  parameter int unsigned W     = 9,
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
