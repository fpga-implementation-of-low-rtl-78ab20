// Check node unit (CNU) for a degree-6 check node, log-domain belief
// propagation.
//
// Each of the six 9-bit hybrid inputs x[p] carries a variable node's hard
// decision and its variable-to-check message {sign, 7-bit magnitude}, where
// the magnitude is already f(|gamma|). For each edge p the unit produces the
// check-to-variable message
//   sign  = XOR of the other five input signs,
//   mag   = f( sum of the other five input magnitudes ),
// and the parity-check result is the XOR of the six hard decisions
// (1: the check is not satisfied).
//
// Structure: stage 1 forms running prefix and suffix sums of the magnitudes
// and the sign/parity XORs; a pipeline register follows; stage 2 adds the
// prefix and suffix around each edge, saturates the sum to 9 bits and looks it
// up in one LUT per edge. Latency is one clock: outputs belong to the inputs
// of the previous cycle. One check node is processed per clock.
//
// The datapath (split of the hybrid word, XOR chains, adders, pipeline cut,
// six 9-bit-input LUTs) follows the source design; the prefix/suffix form of
// the "all but one" sums and the saturation of the 10-bit sum to 9 bits are
// this design's choice.
module ldpc_cnu
  import ldpc_pkg::*;
(
  input  logic clk,
  input  hyb_t x [DC],
  output msg_t y [DC],
  output logic parity_fail
);

  localparam int unsigned SUM_W = 10;  // five 7-bit magnitudes
  localparam int unsigned LIN_W = 9;   // LUT input

  // Stage 1.
  logic [SUM_W-1:0] pre [DC];   // sum of magnitudes 0..p-1
  logic [SUM_W-1:0] suf [DC];   // sum of magnitudes p+1..5
  logic             sign_all, hd_all;

  always_comb begin
    sign_all = 1'b0;
    hd_all   = 1'b0;
    for (int p = 0; p < DC; p++) begin
      sign_all ^= x[p].msg.sign;
      hd_all   ^= x[p].hd;
    end
    pre[0]    = '0;
    suf[DC-1] = '0;
    for (int p = 1; p < DC; p++)
      pre[p] = pre[p-1] + SUM_W'(x[p-1].msg.mag);
    for (int p = DC-2; p >= 0; p--)
      suf[p] = suf[p+1] + SUM_W'(x[p+1].msg.mag);
  end

  // Pipeline register.
  logic [SUM_W-1:0] pre_q [DC];
  logic [SUM_W-1:0] suf_q [DC];
  logic [DC-1:0]    sign_q;
  logic             parity_q;

  always_ff @(posedge clk) begin
    for (int p = 0; p < DC; p++) begin
      pre_q[p]  <= pre[p];
      suf_q[p]  <= suf[p];
      sign_q[p] <= sign_all ^ x[p].msg.sign;
    end
    parity_q <= hd_all;
  end

  // Stage 2.
  logic [SUM_W-1:0] tot [DC];
  logic [LIN_W-1:0] lin [DC];
  logic [MAG_W-1:0] lout [DC];

  for (genvar p = 0; p < DC; p++) begin : g_edge
    always_comb begin
      tot[p] = pre_q[p] + suf_q[p];
      lin[p] = tot[p][SUM_W-1] ? '1 : tot[p][LIN_W-1:0];
    end
    ldpc_lut #(.IN_W(LIN_W)) u_lut (.x(lin[p]), .y(lout[p]));
    assign y[p] = '{sign: sign_q[p], mag: lout[p]};
  end

  assign parity_fail = parity_q;

endmodule
