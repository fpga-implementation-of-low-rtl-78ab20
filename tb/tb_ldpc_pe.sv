// Tests one processing element (L = 16) through INIT, CHECK, VAR, CHECK
// phases, with the stage and address signals a controller would issue
// generated here. Checks: the words RAM 1-3 deliver in each check phase (the
// initial messages {hd, sign(z), f(|z|)}, then the VNU results of the
// variable phase computed by a model from the intrinsic values and the check
// messages sent in), the check messages read back in the variable phase, and
// the DEC RAM contents after INIT, after VAR and after a CHECK phase.
module tb_ldpc_pe;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int L = 16;
  localparam int unsigned OFF [DV] = '{0, 5, 11};

  logic clk = 1'b0;
  stage_t rd = '0, s1 = '0, wr = '0;
  logic [3:0] rd_addr [DV], wr_addr [DV];
  llr_t llr_in = '0;
  hyb_t hyb_out [DV];
  msg_t c2v_in [DV];
  logic [3:0] dec_raddr = '0;
  logic dec_rdata;
  int checks = 0, failures = 0;

  ldpc_pe #(.L(L)) dut (.*);
  always #5 clk = ~clk;

  int z [L];
  logic [8:0] ram_model [DV][L];   // what RAM k should hold
  bit hd_model [L];

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic run_phase(phase_e ph);
    int ra [$][DV];
    for (int t = 0; t < L + 2; t++) begin
      int a [DV];
      // Drive the read stage for cycle t; s1/wr follow the earlier cycles.
      @(negedge clk);
      wr = s1;
      s1 = rd;
      rd = '{valid: t < L, phase: ph};
      for (int k = 0; k < DV; k++) begin
        a[k] = (ph == PH_CHECK) ? (t + int'(OFF[k])) % L : t % L;
        rd_addr[k] = 4'(a[k]);
        wr_addr[k] = (t >= 2) ? 4'(ra[t-2][k]) : '0;
      end
      ra.push_back(a);
      llr_in = (ph == PH_INIT && t < L) ? llr_t'(z[t]) : llr_t'($urandom);
      // Stage 1 data of the read issued in cycle t-1.
      if (t >= 1 && t <= L && ph != PH_INIT)
        for (int k = 0; k < DV; k++)
          if (ph == PH_CHECK)
            chk(hyb_out[k] == ram_model[k][ra[t-1][k]],
                $sformatf("check read k=%0d addr %0d: %h expected %h", k, ra[t-1][k], hyb_out[k], ram_model[k][ra[t-1][k]]));
          else
            chk(hyb_out[k][7:0] == ram_model[k][ra[t-1][k]][7:0], $sformatf("var read k=%0d", k));
      // Write stage of the read issued in cycle t-2.
      if (t >= 2) begin
        int d = ra[t-2][0];
        if (ph == PH_CHECK) begin
          for (int k = 0; k < DV; k++) begin
            logic [7:0] m = 8'($urandom);
            c2v_in[k] = msg_t'(m);
            ram_model[k][ra[t-2][k]] = {1'b0, m};
          end
        end else begin
          int b [DV];
          int lam = z[d];
          for (int k = 0; k < DV; k++) begin
            b[k] = (ph == PH_INIT) ? 0 : sm_val(ram_model[k][d][7:0]);
            lam += b[k];
          end
          hd_model[d] = (lam <= 0);
          for (int k = 0; k < DV; k++) ram_model[k][d] = {lam <= 0, v2c_of(lam - b[k])};
        end
      end
    end
    @(negedge clk);
    wr = s1; s1 = rd; rd = '0;
    @(negedge clk);
    wr = s1; s1 = rd;
    @(negedge clk);
    wr = s1;
  endtask

  task automatic check_dec(string what);
    for (int d = 0; d < L; d++) begin
      dec_raddr = 4'(d);
      @(negedge clk);
      chk(dec_rdata == hd_model[d], $sformatf("%s DEC RAM %0d", what, d));
    end
  endtask

  initial begin
    for (int d = 0; d < L; d++) z[d] = $urandom_range(0, 255) - 128;
    z[3] = 0;
    repeat (2) @(negedge clk);
    run_phase(PH_INIT);
    check_dec("init");
    run_phase(PH_CHECK);
    run_phase(PH_VAR);
    check_dec("var");
    run_phase(PH_CHECK);
    check_dec("check");   // check phases leave DEC RAM alone
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
