// Variable node unit (VNU) for a degree-3 variable node, log-domain belief
// propagation.
//
// Inputs are the three 8-bit sign-magnitude check-to-variable messages y[k]
// and the 8-bit two's complement intrinsic message z (channel LLR, positive
// means bit 0). With b_k the two's complement value of y[k]:
//   gamma_k = z + sum of the other two b   (extrinsic, for edge k)
//   lambda  = z + b_0 + b_1 + b_2          (posterior)
//   hd      = (lambda <= 0)                (hard decision, 1 means bit 1)
//   x[k]    = {hd, sign(gamma_k), f(|gamma_k|)}   (9-bit hybrid word)
// The initial messages of a frame come out when all y are zero.
//
// Structure: stage 1 converts the inputs from sign-magnitude to two's
// complement and forms the pairwise and total sums; a pipeline register
// follows, which also holds z; stage 2 adds z, takes the sign of lambda,
// converts each 10-bit gamma back to sign-magnitude (magnitude saturated to 8
// bits) and looks the magnitude up in the f(x) LUT. Latency is one clock.
//
// The sign-magnitude/two's complement converters, the adder tree, the pipeline
// cut, the 10-bit sums and the 9-bit hybrid outputs follow the source design.
// Registering z with the stage-1 results (rather than presenting it a cycle
// later) and the 8-bit magnitude saturation are this design's choice.
module ldpc_vnu
  import ldpc_pkg::*;
(
  input  logic clk,
  input  msg_t y [DV],
  input  llr_t z,
  output hyb_t x [DV],
  output logic hd
);

  localparam int unsigned S_W = 10;

  // Stage 1: S-to-T conversion and partial sums.
  logic signed [MSG_W-1:0] b [DV];
  logic signed [S_W-1:0]   other [DV];
  logic signed [S_W-1:0]   all_sum;

  always_comb begin
    for (int k = 0; k < DV; k++)
      b[k] = y[k].sign ? -$signed({1'b0, y[k].mag}) : $signed({1'b0, y[k].mag});
    other[0] = S_W'(b[1]) + S_W'(b[2]);
    other[1] = S_W'(b[0]) + S_W'(b[2]);
    other[2] = S_W'(b[0]) + S_W'(b[1]);
    all_sum  = S_W'(b[0]) + S_W'(b[1]) + S_W'(b[2]);
  end

  // Pipeline register.
  logic signed [S_W-1:0] other_q [DV];
  logic signed [S_W-1:0] all_q;
  llr_t                  z_q;

  always_ff @(posedge clk) begin
    other_q <= other;
    all_q   <= all_sum;
    z_q     <= z;
  end

  // Stage 2: add intrinsic, hard decision, T-to-S, LUT.
  logic signed [S_W-1:0] gamma [DV];
  logic signed [S_W-1:0] lambda;
  logic [S_W-1:0]        gabs  [DV];
  logic [MSG_W-1:0]      gmag  [DV];
  logic [MAG_W-1:0]      fmag  [DV];

  always_comb begin
    lambda = all_q + S_W'(z_q);
    hd     = (lambda <= 0);
  end

  for (genvar k = 0; k < DV; k++) begin : g_edge
    always_comb begin
      gamma[k] = other_q[k] + S_W'(z_q);
      gabs[k]  = gamma[k][S_W-1] ? S_W'(-gamma[k]) : S_W'(gamma[k]);
      gmag[k]  = (gabs[k] > S_W'(255)) ? 8'hFF : gabs[k][MSG_W-1:0];
    end
    ldpc_lut #(.IN_W(MSG_W)) u_lut (.x(gmag[k]), .y(fmag[k]));
    assign x[k] = '{hd: hd, msg: '{sign: gamma[k][S_W-1], mag: fmag[k]}};
  end

endmodule
