// Tests the check node unit with random and corner-case hybrid inputs: each
// output message (sign = XOR of the other signs, magnitude = f of the other
// magnitudes' sum, saturated to 511) and the parity of the hard decisions are
// compared with a model one clock after the inputs (pipeline latency 1).
module tb_ldpc_cnu;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  logic clk = 1'b0;
  hyb_t x [DC];
  msg_t y [DC];
  logic parity_fail;
  int checks = 0, failures = 0;
  int n_sat = 0;

  ldpc_cnu dut (.clk, .x, .y, .parity_fail);
  always #5 clk = ~clk;

  logic [7:0] exp_y [DC];
  bit exp_par;

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int sum;
      bit sg;
      @(negedge clk);
      sum = 0; sg = 0; exp_par = 0;
      for (int p = 0; p < DC; p++) begin
        automatic logic [8:0] w = 9'($urandom);
        if (t < 500) w[6:0] = 7'd127 - 7'($urandom_range(0, 3));    // large: sum saturates
        else if (t < 1000) w[6:0] = 7'($urandom_range(0, 40));      // small: LUT saturates
        x[p] = hyb_t'(w);
        sum += int'(w[6:0]);
        sg ^= w[7];
        exp_par ^= w[8];
      end
      for (int p = 0; p < DC; p++) begin
        if (sum - int'(x[p].msg.mag) > 511) n_sat++;
        exp_y[p] = c2v_of(sum - int'(x[p].msg.mag), sg ^ x[p].msg.sign);
      end
      @(negedge clk);
      for (int p = 0; p < DC; p++) begin
        checks++;
        if (y[p] != exp_y[p]) begin
          failures++;
          if (failures < 10) $display("FAIL: t=%0d edge %0d got %h expected %h", t, p, y[p], exp_y[p]);
        end
      end
      checks++;
      if (parity_fail != exp_par) failures++;
    end
    checks++;
    if (n_sat == 0) failures++;
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
