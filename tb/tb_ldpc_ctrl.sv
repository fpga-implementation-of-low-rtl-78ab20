// Tests the controller (L = 8, MAX_ITER = 3). For several frames a plan says
// in which check phases a parity failure is reported, and at which of its
// write-stage cycles (first, middle or last). The testbench predicts the
// phase sequence (INIT, then CHECK/VAR until a clean check phase or the
// iteration limit) and checks every cycle: the read stage (L issue cycles,
// then 2 drain cycles), the s1 and wr stages one and two cycles later,
// in_ready/in_addr during INIT, the address-generator presets, done,
// converged, iterations and the cycle count from start to done.
module tb_ldpc_ctrl;
  import ldpc_pkg::*;

  localparam int L = 8;
  localparam int MAXI = 3;
  localparam int PH_LEN = L + 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic parity_fail;
  stage_t rd, s1, wr;
  logic load, load_chk, in_ready, busy, done, converged;
  logic [2:0] in_addr;
  logic [1:0] iterations;
  int checks = 0, failures = 0;
  int n_early = 0, n_limit = 0, n_last_cycle = 0;

  ldpc_ctrl #(.L(L), .MAX_ITER(MAXI)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // Plan of the running frame: fail_at[c] = write-stage index at which check
  // phase c reports a failure, -1 for none.
  int fail_at [8];
  int chk_no, wr_idx;
  stage_t rd_h [$];

  // parity_fail as the CNUs would report it at the write stage.
  always_comb parity_fail = wr.valid && wr.phase == PH_CHECK && fail_at[chk_no] == wr_idx;

  task automatic frame(int f0, int f1, int f2, int f3);
    phase_e seq [$];
    int iters, cyc, idx;
    bit conv;
    fail_at = '{f0, f1, f2, f3, -1, -1, -1, -1};
    // Expected phases.
    seq.push_back(PH_INIT);
    iters = 0; conv = 0;
    for (int c = 0; ; c++) begin
      seq.push_back(PH_CHECK);
      if (fail_at[c] < 0) begin conv = 1; break; end
      if (fail_at[c] == L - 1) n_last_cycle++;
      seq.push_back(PH_VAR);
      iters++;
      if (iters == MAXI) break;
    end
    if (conv) n_early++; else n_limit++;
    chk_no = 0; wr_idx = 0;
    @(negedge clk);
    start = 1'b1;
    #1 chk(load && !load_chk, "preset on start");
    @(negedge clk);
    start = 1'b0;
    rd_h.delete();
    cyc = 1;
    idx = 0;
    foreach (seq[s]) begin
      for (int t = 0; t < PH_LEN; t++) begin
        chk(busy && !done, "busy during frame");
        chk(rd.valid == (t < L) && rd.phase == seq[s], $sformatf("rd stage phase %0d cycle %0d", s, t));
        chk(in_ready == (t < L && seq[s] == PH_INIT), "in_ready");
        if (t < L) chk(int'(in_addr) == t, "in_addr");
        chk(load == (t == L), "preset cycle");
        if (t == L) chk(load_chk == (seq[s] != PH_CHECK), "preset kind");
        if (rd_h.size() >= 1) chk(s1 == rd_h[rd_h.size()-1], "s1 stage");
        if (rd_h.size() >= 2) chk(wr == rd_h[rd_h.size()-2], "wr stage");
        rd_h.push_back(rd);
        @(negedge clk);
        cyc++;
      end
    end
    chk(done, "done after the last phase");
    chk(converged == conv, $sformatf("converged %0d expected %0d", converged, conv));
    chk(int'(iterations) == iters, $sformatf("iterations %0d expected %0d", iterations, iters));
    chk(cyc == PH_LEN * seq.size() + 1, "cycles from start to done");
    @(negedge clk);
    chk(!done && !busy, "idle after done");
    chk(converged == conv && int'(iterations) == iters, "results held");
  endtask

  // Count write-stage cycles of each check phase.
  always @(posedge clk) begin
    if (wr.valid && wr.phase == PH_CHECK) begin
      if (wr_idx == L - 1) begin
        wr_idx <= 0;
        chk_no <= chk_no + 1;
      end else begin
        wr_idx <= wr_idx + 1;
      end
    end
  end

  initial begin
    chk_no = 0; wr_idx = 0;
    fail_at = '{-1, -1, -1, -1, -1, -1, -1, -1};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    frame(-1, -1, -1, -1);          // clean at once
    frame(0, -1, -1, -1);           // one iteration
    frame(L - 1, 3, -1, -1);        // failure on the last cycle only, then middle
    frame(2, 5, L - 1, -1);         // iteration limit
    chk(n_early > 0 && n_limit > 0 && n_last_cycle > 0, "all stop cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
