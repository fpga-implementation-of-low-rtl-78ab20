// End-to-end test of the LDPC decoder at its default size (L = 256, 9216-bit
// codewords, at most 10 iterations).
//
// Each frame is a codeword sent with BPSK (bit 0 -> +1, bit 1 -> -1) over an
// AWGN channel; the channel LLR 2y/sigma^2 is quantized to 8 bits with 5
// fractional bits and saturated to +-127. Two codewords are used: all zeros
// and all ones (every check has six 1s, so all ones is a codeword). A
// bit-true software decoder in this file (ldpc_ref_pkg arithmetic) decodes the
// same frame; the testbench compares, frame by frame, the decoded bits read
// from the DEC RAM port, the converged flag, the iteration count and the
// number of cycles from start to done.
//
// Frames: noiseless (stops in the first check phase), sigma = 0.4 (the
// channel of the source design's evaluation, needs iterations), and a very
// noisy frame that runs into the iteration limit. Each mechanism (immediate
// stop, stop after iterating, iteration limit) is counted and must occur.
module tb_ldpc_decoder;
  import ldpc_ref_pkg::*;

  localparam int L        = 256;
  localparam int MAXI     = 10;
  localparam int N        = NBR * L;
  localparam int M        = MBR * L;
  localparam int PH_LEN   = L + 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic in_ready, busy, done, converged;
  logic [7:0] in_addr;
  logic signed [7:0] llr_in [NBR];
  logic [3:0] iterations;
  logic [7:0] dec_raddr = '0;
  logic [NBR-1:0] dec_rdata;

  ldpc_decoder dut (
    .clk, .rst_n, .start, .in_ready, .in_addr, .llr_in, .busy, .done,
    .converged, .iterations, .dec_raddr, .dec_rdata
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Expanded code: variable of edge p of check c, and the three edges of
  // each variable.
  int evar  [M*6];
  int vedge [N*3];
  int vcnt  [N];

  int z [N];
  bit hd [N];
  logic [7:0] v2c [M*6];
  logic [7:0] c2v [M*6];

  always_comb
    for (int j = 0; j < NBR; j++) llr_in[j] = 8'(z[j*L + int'(in_addr)]);

  task automatic build_code();
    for (int v = 0; v < N; v++) vcnt[v] = 0;
    for (int i = 0; i < MBR; i++) begin
      int p = 0;
      for (int j = 0; j < NBR; j++)
        if (h_at(i, j)) begin
          for (int r = 0; r < L; r++) begin
            int c = i*L + r;
            int v = j*L + (r + shift_ref(i, j, L)) % L;
            evar[c*6 + p] = v;
            vedge[v*3 + vcnt[v]] = c*6 + p;
            vcnt[v]++;
          end
          p++;
        end
    end
  endtask

  // Bit-true software decode of z; returns iterations and convergence.
  task automatic ref_decode(output int iters, output bit conv);
    for (int v = 0; v < N; v++) begin
      hd[v] = (z[v] <= 0);
      for (int k = 0; k < 3; k++) v2c[vedge[v*3+k]] = v2c_of(z[v]);
    end
    iters = 0;
    conv = 0;
    forever begin
      bit any_fail = 0;
      for (int c = 0; c < M; c++) begin
        bit par = 0;
        bit sg = 0;
        int sum = 0;
        for (int p = 0; p < 6; p++) begin
          par ^= hd[evar[c*6+p]];
          sg  ^= v2c[c*6+p][7];
          sum += int'(v2c[c*6+p][6:0]);
        end
        if (par) any_fail = 1;
        for (int p = 0; p < 6; p++)
          c2v[c*6+p] = c2v_of(sum - int'(v2c[c*6+p][6:0]), sg ^ v2c[c*6+p][7]);
      end
      if (!any_fail) begin
        conv = 1;
        break;
      end
      for (int v = 0; v < N; v++) begin
        int b [3];
        int lam = z[v];
        for (int k = 0; k < 3; k++) begin
          b[k] = sm_val(c2v[vedge[v*3+k]]);
          lam += b[k];
        end
        hd[v] = (lam <= 0);
        for (int k = 0; k < 3; k++) v2c[vedge[v*3+k]] = v2c_of(lam - b[k]);
      end
      iters++;
      if (iters == MAXI) break;
    end
  endtask

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * 3.14159265358979 * u2);
  endfunction

  task automatic make_frame(bit ones, real sigma);
    for (int v = 0; v < N; v++) begin
      real y, llr;
      int q;
      y = ones ? -1.0 : 1.0;
      if (sigma > 0.0) begin
        y += sigma * gauss();
        llr = 2.0 * y / (sigma * sigma);
      end else begin
        llr = 2.0 * y / (0.4 * 0.4);
      end
      q = $rtoi(llr * 32.0 + ((llr < 0.0) ? -0.5 : 0.5));
      if (q > 127) q = 127;
      if (q < -127) q = -127;
      z[v] = q;
    end
  endtask

  int n_stop0 = 0, n_stopk = 0, n_limit = 0;

  task automatic run_frame(bit ones, real sigma, string name);
    int exp_it, cyc, raw_err, bit_err;
    bit exp_conv;
    make_frame(ones, sigma);
    raw_err = 0;
    for (int v = 0; v < N; v++) if ((z[v] <= 0) != ones) raw_err++;
    ref_decode(exp_it, exp_conv);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
      if (cyc > 100000) break;
    end
    check(done, {name, ": done"});
    check(converged == exp_conv, $sformatf("%s: converged %0d expected %0d", name, converged, exp_conv));
    check(int'(iterations) == exp_it, $sformatf("%s: iterations %0d expected %0d", name, iterations, exp_it));
    // done is registered: it rises one edge after the last phase ends.
    check(cyc == PH_LEN * (exp_conv ? (2*exp_it + 2) : (2*exp_it + 1)) + 1,
          $sformatf("%s: %0d cycles from start to done", name, cyc));
    bit_err = 0;
    for (int d = 0; d < L; d++) begin
      dec_raddr = 8'(d);
      @(negedge clk);
      for (int j = 0; j < NBR; j++) begin
        check(dec_rdata[j] == hd[j*L + d], $sformatf("%s: bit %0d", name, j*L + d));
        if (dec_rdata[j] != ones) bit_err++;
      end
    end
    if (exp_conv && exp_it == 0) n_stop0++;
    if (exp_conv && exp_it > 0)  n_stopk++;
    if (!exp_conv)               n_limit++;
    $display("%s: channel errors %0d, decoded errors %0d, iterations %0d, converged %0d, %0d cycles",
             name, raw_err, bit_err, iterations, converged, cyc);
  endtask

  initial begin
    build_code();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run_frame(1'b0, 0.0, "zeros noiseless");
    run_frame(1'b0, 0.4, "zeros sigma 0.4");
    run_frame(1'b1, 0.4, "ones sigma 0.4");
    run_frame(1'b1, 1.2, "ones sigma 1.2");
    check(n_stop0 > 0, "a frame stopped in the first check phase");
    check(n_stopk > 0, "a frame stopped after iterating");
    check(n_limit > 0, "a frame reached the iteration limit");
    $display("mechanisms: stop at once %0d, stop after iterating %0d, iteration limit %0d",
             n_stop0, n_stopk, n_limit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
