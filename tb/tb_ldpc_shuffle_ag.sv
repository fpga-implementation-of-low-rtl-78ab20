// Tests the shuffle network and address generators against the dense base
// matrix: every CNU input must see the word of the right RAM of the right PE
// (tagged words in both directions), and in the check phase the address of
// RAM k of PE j must run from the shift ((i-1)*j) mod L of its circulant,
// with i the base row of the k-th 1 of column j (1-based i, j).
module tb_ldpc_shuffle_ag;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int L = 256;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic load = 1'b0, load_chk = 1'b0, rd_valid = 1'b0;
  hyb_t       pe_v2c  [NB][DV];
  msg_t       pe_c2v  [NB][DV];
  logic [7:0] rd_addr [NB][DV];
  logic [7:0] wr_addr [NB][DV];
  hyb_t       cnu_v2c [MB][DC];
  msg_t       cnu_c2v [MB][DC];
  int checks = 0, failures = 0;

  ldpc_shuffle_ag #(.L(L)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // Rows of each column, increasing.
  int crow [NBR][3];

  initial begin
    for (int j = 0; j < NBR; j++) begin
      automatic int n = 0;
      for (int i = 0; i < MBR; i++) if (h_at(i, j)) begin crow[j][n] = i; n++; end
    end
    for (int j = 0; j < NBR; j++)
      for (int k = 0; k < 3; k++) pe_v2c[j][k] = hyb_t'({1'b1, 6'(j), 2'(k)});
    for (int i = 0; i < MBR; i++)
      for (int p = 0; p < 6; p++) cnu_c2v[i][p] = msg_t'({3'(p), 5'(i)});
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    #1;
    for (int i = 0; i < MBR; i++) begin
      automatic int p = 0;
      for (int j = 0; j < NBR; j++) if (h_at(i, j)) begin
        automatic int k = 0;
        for (int kk = 0; kk < 3; kk++) if (crow[j][kk] == i) k = kk;
        chk(cnu_v2c[i][p] == hyb_t'({1'b1, 6'(j), 2'(k)}), $sformatf("forward row %0d input %0d", i, p));
        chk(pe_c2v[j][k] == msg_t'({3'(p), 5'(i)}), $sformatf("backward col %0d ram %0d", j, k));
        p++;
      end
      chk(p == 6, "row weight");
    end
    // Check-phase addresses.
    @(negedge clk);
    load = 1'b1; load_chk = 1'b1;
    @(negedge clk);
    load = 1'b0; rd_valid = 1'b1;
    for (int t = 0; t < L; t++) begin
      for (int j = 0; j < NBR; j++)
        for (int k = 0; k < 3; k++)
          chk(int'(rd_addr[j][k]) == (shift_ref(crow[j][k], j, L) + t) % L,
              $sformatf("address col %0d ram %0d t %0d: %0d", j, k, t, rd_addr[j][k]));
      @(negedge clk);
    end
    rd_valid = 1'b0;
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
