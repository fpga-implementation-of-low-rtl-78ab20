// Shuffle network and address generators.
//
// The network is the bidirectional interconnect that realizes the Tanner
// graph of the 18 x 36 base matrix: input p of CNU i is wired to RAM k of PE
// j, where j is the p-th column of base row i and k the position of row i
// among the three rows of column j. Two separate sets of wires carry the
// 9-bit variable-to-check words (PE to CNU) and the 8-bit check-to-variable
// messages (CNU to PE). Because every 1 of the base matrix is a cyclically
// shifted L x L identity, the expanded graph needs no further switching:
// the address generator of each PE (one counter per RAM, offset by the
// circulant's shift) selects which variable node of the group meets which
// check node of the group in each cycle.
//
// All wiring is fixed at elaboration from ldpc_pkg::BASE_COLS; the address
// generators are clocked (see ldpc_addr_gen). The arrangement follows the
// source design.
module ldpc_shuffle_ag
  import ldpc_pkg::*;
#(
  parameter int unsigned L   = 256,
  localparam int unsigned AW = (L > 1) ? $clog2(L) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic          load_chk,
  input  logic          rd_valid,
  // PE side
  input  hyb_t          pe_v2c  [NB][DV],
  output msg_t          pe_c2v  [NB][DV],
  output logic [AW-1:0] rd_addr [NB][DV],
  output logic [AW-1:0] wr_addr [NB][DV],
  // CNU side
  output hyb_t          cnu_v2c [MB][DC],
  input  msg_t          cnu_c2v [MB][DC]
);

  // Address generators, one per PE.
  for (genvar j = 0; j < NB; j++) begin : g_ag
    localparam int unsigned OFFS [DV] = '{
      shift_of(col_row(j, 0), j, L),
      shift_of(col_row(j, 1), j, L),
      shift_of(col_row(j, 2), j, L)
    };
    ldpc_addr_gen #(.L(L), .OFFS(OFFS)) u_ag (
      .clk, .rst_n, .load, .load_chk, .rd_valid,
      .rd_addr(rd_addr[j]), .wr_addr(wr_addr[j])
    );
  end

  // Forward and backward wires.
  for (genvar i = 0; i < MB; i++) begin : g_row
    for (genvar p = 0; p < DC; p++) begin : g_edge
      localparam int unsigned J = 32'(BASE_COLS[i][p]);
      localparam int unsigned K = edge_ram(i, p);
      assign cnu_v2c[i][p] = pe_v2c[J][K];
      assign pe_c2v[J][K]  = cnu_c2v[i][p];
    end
  end

endmodule
