// Processing element (PE): one variable node unit with its memories, serving
// a variable node group of L nodes (one base-matrix column).
//
// Memories: INIT RAM (L x 8, intrinsic messages), RAM 1-3 (L x 9, the
// messages exchanged with the 1st, 2nd and 3rd neighbouring check node
// groups, in increasing base-row order) and DEC RAM (L x 1, hard decisions).
// Word d-1 of every RAM belongs to variable node d.
//
// Per phase (see ldpc_ctrl):
//   INIT : llr_in is written to INIT RAM at the read stage and, registered
//          once to line up with a RAM read, fed to the VNU as z with all
//          check messages zero; the VNU outputs are written to RAM 1-3 and
//          the hard decision to DEC RAM.
//   CHECK: RAM k is read at rd_addr[k]; the 9-bit word goes out on
//          hyb_out[k] to the shuffle network, and the check-to-variable
//          message c2v_in[k] that comes back two cycles later is written at
//          wr_addr[k] (hard-decision bit cleared).
//   VAR  : RAM 1-3 and INIT RAM are read at the same address; the VNU
//          results are written back to the same word of RAM 1-3 and the hard
//          decision to DEC RAM.
// The multiplexer in front of RAM 1-3 selects between the shuffle network
// (CHECK) and the VNU (INIT, VAR). DEC RAM has a second, external read port
// (dec_raddr, one cycle latency) for reading the decoded word.
//
// The memory set, the VNU and the write multiplexer follow the source design;
// the INIT-phase bypass of INIT RAM is this design's choice.
module ldpc_pe
  import ldpc_pkg::*;
#(
  parameter int unsigned L   = 256,
  localparam int unsigned AW = (L > 1) ? $clog2(L) : 1
) (
  input  logic          clk,
  input  stage_t        rd,
  input  stage_t        s1,
  input  stage_t        wr,
  input  logic [AW-1:0] rd_addr [DV],
  input  logic [AW-1:0] wr_addr [DV],
  input  llr_t          llr_in,
  output hyb_t          hyb_out [DV],
  input  msg_t          c2v_in  [DV],
  input  logic [AW-1:0] dec_raddr,
  output logic          dec_rdata
);

  // INIT RAM.
  logic init_we;
  llr_t init_rdata;
  assign init_we = rd.valid && (rd.phase == PH_INIT);

  ldpc_ram #(.W(INTR_W), .DEPTH(L)) u_init_ram (
    .clk, .we(init_we), .waddr(rd_addr[0]), .wdata(llr_in),
    .raddr(rd_addr[0]), .rdata(init_rdata)
  );

  llr_t llr_q;
  always_ff @(posedge clk) llr_q <= llr_in;

  // VNU.
  msg_t vnu_y [DV];
  llr_t vnu_z;
  hyb_t vnu_x [DV];
  logic vnu_hd;

  always_comb begin
    vnu_z = (s1.phase == PH_INIT) ? llr_q : init_rdata;
    for (int k = 0; k < DV; k++)
      vnu_y[k] = (s1.phase == PH_INIT) ? '0 : hyb_out[k].msg;
  end

  ldpc_vnu u_vnu (.clk, .y(vnu_y), .z(vnu_z), .x(vnu_x), .hd(vnu_hd));

  // RAM 1-3 with their write multiplexer.
  logic ram_we;
  hyb_t ram_wdata [DV];
  assign ram_we = wr.valid;

  for (genvar k = 0; k < DV; k++) begin : g_ram
    assign ram_wdata[k] = (wr.phase == PH_CHECK) ? '{hd: 1'b0, msg: c2v_in[k]} : vnu_x[k];
    ldpc_ram #(.W(HYB_W), .DEPTH(L)) u_ram (
      .clk, .we(ram_we), .waddr(wr_addr[k]), .wdata(ram_wdata[k]),
      .raddr(rd_addr[k]), .rdata(hyb_out[k])
    );
  end

  // DEC RAM.
  logic dec_we;
  assign dec_we = wr.valid && (wr.phase != PH_CHECK);

  ldpc_ram #(.W(1), .DEPTH(L)) u_dec_ram (
    .clk, .we(dec_we), .waddr(wr_addr[0]), .wdata(vnu_hd),
    .raddr(dec_raddr), .rdata(dec_rdata)
  );

  // Outside the check phase all three RAMs share one address.
  a_var_addr: assert property (@(posedge clk)
    (rd.valid && rd.phase != PH_CHECK) |-> (rd_addr[0] == rd_addr[1] && rd_addr[1] == rd_addr[2]));

endmodule
