// Workload test of the LDPC decoder at its default size (L = 256): twelve
// 9216-bit frames over the AWGN channel with noise standard deviation 0.4
// (BPSK, LLR = 2y/sigma^2 quantized to 8 bits with 5 fractional bits),
// alternating the all-zeros and all-ones codewords. Every frame is compared
// bit for bit with the software decoder in this file (decoded bits, converged
// flag, iterations, cycles). The run reports the channel and decoded bit
// errors, the mean number of iterations and the throughput the measured
// cycle counts give at a 48 MHz clock, and checks that no frame needed more
// cycles than the 10-iteration worst case.
module tb_ldpc_awgn;
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

  int tot_cycles = 0, tot_iters = 0, frame_err = 0, tot_raw = 0, tot_dec = 0;

  task automatic run_frame(bit ones, real sigma, int f);
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
    check(done, $sformatf("frame %0d: done", f));
    check(converged == exp_conv, $sformatf("frame %0d: converged", f));
    check(int'(iterations) == exp_it, $sformatf("frame %0d: iterations", f));
    check(cyc == PH_LEN * (exp_conv ? (2*exp_it + 2) : (2*exp_it + 1)) + 1, $sformatf("frame %0d: cycles", f));
    check(cyc <= PH_LEN * (2*MAXI + 1) + 1, $sformatf("frame %0d: within the worst case", f));
    bit_err = 0;
    for (int d = 0; d < L; d++) begin
      dec_raddr = 8'(d);
      @(negedge clk);
      for (int j = 0; j < NBR; j++) begin
        check(dec_rdata[j] == hd[j*L + d], $sformatf("frame %0d: bit %0d", f, j*L + d));
        if (dec_rdata[j] != ones) bit_err++;
      end
    end
    tot_cycles += cyc;
    tot_iters += int'(iterations);
    tot_raw += raw_err;
    tot_dec += bit_err;
    if (bit_err != 0) frame_err++;
  endtask

  initial begin
    build_code();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int f = 0; f < 12; f++) run_frame(f[0], 0.4, f);
    $display("sigma 0.4, 12 frames: channel bit errors %0d, decoded bit errors %0d, frame errors %0d",
             tot_raw, tot_dec, frame_err);
    $display("mean iterations %0.2f, mean cycles per frame %0.1f, throughput at 48 MHz %0.1f Mbps",
             real'(tot_iters) / 12.0, real'(tot_cycles) / 12.0,
             48.0 * real'(N) * 12.0 / real'(tot_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
