// Address generator (AG) of one processing element.
//
// The messages of variable node d of a group always live at address d-1 of
// each RAM, so addresses come from binary counters. For check node
// processing, RAM k's counter starts at the cyclic shift OFFS[k] of the
// circulant that joins this variable group to its k-th check group and counts
// up modulo L; for initialization and variable node processing all three
// start at 0. A load pulse (one cycle before a phase starts) presets the
// counters for the coming phase, and each issue cycle advances
// them. The write addresses are the read addresses delayed by the
// read-compute-write latency PIPE_LAT, so every result is written back to the
// word it came from.
//
// The counter-with-offset scheme follows the source design; the load pulse
// and the write-address delay line are this design's choice. Reset is
// synchronous and active low.
module ldpc_addr_gen
  import ldpc_pkg::*;
#(
  parameter int unsigned L    = 256,
  parameter int unsigned OFFS [DV] = '{0, 0, 0},
  localparam int unsigned AW  = (L > 1) ? $clog2(L) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,       // preset counters for the next phase
  input  logic          load_chk,   // next phase is check node processing
  input  logic          rd_valid,   // issue cycle of the read stage
  output logic [AW-1:0] rd_addr [DV],
  output logic [AW-1:0] wr_addr [DV]
);

  logic [AW-1:0] cnt [DV];
  logic [AW-1:0] d1  [DV];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < DV; k++) begin
        cnt[k] <= '0;
        d1[k]  <= '0;
        wr_addr[k] <= '0;
      end
    end else begin
      for (int k = 0; k < DV; k++) begin
        if (load)          cnt[k] <= load_chk ? AW'(OFFS[k] % L) : '0;
        else if (rd_valid) cnt[k] <= (32'(cnt[k]) == L - 1) ? '0 : cnt[k] + 1'b1;
        d1[k]      <= cnt[k];
        wr_addr[k] <= d1[k];
      end
    end
  end

  assign rd_addr = cnt;

  // A preset may not fall on an issue cycle.
  a_load_idle: assert property (@(posedge clk) disable iff (!rst_n) load |-> !rd_valid);

endmodule
