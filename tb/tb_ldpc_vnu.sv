// Tests the variable node unit with random check messages and intrinsic
// values: the three hybrid outputs {hd, sign(gamma_k), f(|gamma_k|)} and the
// hard decision (lambda <= 0) are compared with a model one clock after the
// inputs (pipeline latency 1). Zero check messages (the initialization case)
// and lambda = 0 are forced in part of the run.
module tb_ldpc_vnu;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  logic clk = 1'b0;
  msg_t y [DV];
  llr_t z;
  hyb_t x [DV];
  logic hd;
  int checks = 0, failures = 0;
  int n_zero_lam = 0;

  ldpc_vnu dut (.clk, .y, .z, .x, .hd);
  always #5 clk = ~clk;

  logic [8:0] exp_x [DV];
  bit exp_hd;

  initial begin
    for (int t = 0; t < 4000; t++) begin
      int b [DV];
      int lam;
      @(negedge clk);
      z = llr_t'($urandom);
      for (int k = 0; k < DV; k++) begin
        y[k] = msg_t'($urandom);
        if (t < 300) y[k] = '0;
      end
      if (t >= 300 && t < 600) begin     // lambda = 0
        if (int'(z) == -128) z = 0;
        y[0] = '{sign: z >= 0, mag: 7'(z < 0 ? -int'(z) : int'(z)) };
        y[1] = '{sign: 1'b0, mag: 7'd20};
        y[2] = '{sign: 1'b1, mag: 7'd20};
      end
      lam = int'(z);
      for (int k = 0; k < DV; k++) begin
        b[k] = sm_val(y[k]);
        lam += b[k];
      end
      if (lam == 0) n_zero_lam++;
      exp_hd = (lam <= 0);
      for (int k = 0; k < DV; k++) exp_x[k] = {exp_hd, v2c_of(lam - b[k])};
      @(negedge clk);
      for (int k = 0; k < DV; k++) begin
        checks++;
        if (x[k] != exp_x[k]) begin
          failures++;
          if (failures < 10) $display("FAIL: t=%0d edge %0d got %h expected %h", t, k, x[k], exp_x[k]);
        end
      end
      checks++;
      if (hd != exp_hd) failures++;
    end
    checks++;
    if (n_zero_lam == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
