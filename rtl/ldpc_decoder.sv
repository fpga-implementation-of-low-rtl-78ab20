// Partly parallel decoder for a (3,6)-regular, rate-1/2 LDPC code built from
// an 18 x 36 base matrix expanded by cyclically shifted L x L identities
// (L = 256: 9216-bit codewords, 4608 checks), using log-domain belief
// propagation with early termination.
//
// The base matrix is mapped directly onto hardware: 36 processing elements
// (one VNU and its RAMs per base column) and 18 check node units (one per
// base row), joined by a fixed shuffle network; each node unit serves the L
// expanded nodes of its group one per clock. An iteration is a check-node
// phase followed by a variable-node phase of L issue cycles each (plus two
// drain cycles), under ldpc_ctrl.
//
// Interface:
//   start            pulse while idle (busy = 0) to decode a frame.
//   in_ready/in_addr during the L load cycles that follow, llr_in must hold
//                    the intrinsic messages of word in_addr: llr_in[j] is the
//                    8-bit two's complement LLR (5 fractional bits, positive
//                    for bit 0) of codeword bit j*L + in_addr.
//   done             one-cycle pulse at the end of the frame; converged says
//                    whether every parity check was satisfied, iterations how
//                    many iterations ran.
//   dec_raddr/dec_rdata  read port of the DEC RAMs: one cycle after dec_raddr
//                    = d, dec_rdata[j] is decoded bit j*L + d. Valid from done
//                    until the next start.
// Timing: a frame stopping in the check phase after r iterations takes
// (L+2)(2r+2) cycles from start to done; one that reaches MAX_ITER takes
// (L+2)(2*MAX_ITER+1).
//
// The architecture follows the source design; port list, handshake and
// drain cycles are this design's choice.
module ldpc_decoder
  import ldpc_pkg::*;
#(
  parameter int unsigned L        = 256,
  parameter int unsigned MAX_ITER = 10,
  localparam int unsigned AW      = (L > 1) ? $clog2(L) : 1,
  localparam int unsigned IW      = $clog2(MAX_ITER + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          in_ready,
  output logic [AW-1:0] in_addr,
  input  llr_t          llr_in [NB],
  output logic          busy,
  output logic          done,
  output logic          converged,
  output logic [IW-1:0] iterations,
  input  logic [AW-1:0] dec_raddr,
  output logic [NB-1:0] dec_rdata
);

  stage_t rd, s1, wr;
  logic   load, load_chk;
  logic   parity_fail;

  hyb_t          pe_v2c  [NB][DV];
  msg_t          pe_c2v  [NB][DV];
  logic [AW-1:0] rd_addr [NB][DV];
  logic [AW-1:0] wr_addr [NB][DV];
  hyb_t          cnu_v2c [MB][DC];
  msg_t          cnu_c2v [MB][DC];
  logic [MB-1:0] cnu_fail;

  ldpc_ctrl #(.L(L), .MAX_ITER(MAX_ITER)) u_ctrl (
    .clk, .rst_n, .start, .parity_fail,
    .rd, .s1, .wr, .load, .load_chk,
    .in_ready, .in_addr, .busy, .done, .converged, .iterations
  );

  ldpc_shuffle_ag #(.L(L)) u_shuffle (
    .clk, .rst_n, .load, .load_chk, .rd_valid(rd.valid),
    .pe_v2c, .pe_c2v, .rd_addr, .wr_addr, .cnu_v2c, .cnu_c2v
  );

  for (genvar j = 0; j < NB; j++) begin : g_pe
    ldpc_pe #(.L(L)) u_pe (
      .clk, .rd, .s1, .wr,
      .rd_addr(rd_addr[j]), .wr_addr(wr_addr[j]),
      .llr_in(llr_in[j]),
      .hyb_out(pe_v2c[j]), .c2v_in(pe_c2v[j]),
      .dec_raddr, .dec_rdata(dec_rdata[j])
    );
  end

  for (genvar i = 0; i < MB; i++) begin : g_cnu
    ldpc_cnu u_cnu (
      .clk, .x(cnu_v2c[i]), .y(cnu_c2v[i]), .parity_fail(cnu_fail[i])
    );
  end

  assign parity_fail = |cnu_fail;

endmodule
