// Tests the address generator: after a check-phase preset each RAM's address
// runs OFFS[k], OFFS[k]+1, ... modulo L; after a plain preset all run
// 0, 1, ...; the write address repeats the read address two cycles later.
// Two instances: L = 20 (wrap at a non-power of two, offset beyond L) and the
// default L = 256.
module tb_ldpc_addr_gen;
  import ldpc_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic load = 1'b0, load_chk = 1'b0, rd_valid = 1'b0;
  logic [4:0] ra20 [DV], wa20 [DV];
  logic [7:0] ra256 [DV], wa256 [DV];
  int checks = 0, failures = 0;

  localparam int unsigned O20  [DV] = '{3, 0, 27};
  localparam int unsigned O256 [DV] = '{255, 17, 100};

  ldpc_addr_gen #(.L(20), .OFFS(O20)) dut20 (
    .clk, .rst_n, .load, .load_chk, .rd_valid, .rd_addr(ra20), .wr_addr(wa20));
  ldpc_addr_gen #(.OFFS(O256)) dut256 (
    .clk, .rst_n, .load, .load_chk, .rd_valid, .rd_addr(ra256), .wr_addr(wa256));

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic phase(bit is_chk);
    int hist20 [$][DV];
    int hist256 [$][DV];
    @(negedge clk);
    load = 1'b1; load_chk = is_chk; rd_valid = 1'b0;
    @(negedge clk);
    load = 1'b0; rd_valid = 1'b1;
    for (int t = 0; t < 256 + 2; t++) begin
      int e20 [DV];
      int e256 [DV];
      if (t == 256) rd_valid = 1'b0;
      for (int k = 0; k < DV; k++) begin
        e20[k]  = is_chk ? (int'(O20[k]) % 20 + t) % 20 : t % 20;
        e256[k] = is_chk ? (int'(O256[k]) + t) % 256 : t % 256;
        if (t < 256) begin
          chk(int'(ra256[k]) == e256[k], $sformatf("L=256 rd k=%0d t=%0d got %0d exp %0d", k, t, ra256[k], e256[k]));
          chk(int'(ra20[k]) == e20[k], $sformatf("L=20 rd k=%0d t=%0d got %0d exp %0d", k, t, ra20[k], e20[k]));
        end
        if (t >= 2) begin
          chk(int'(wa256[k]) == hist256[t-2][k], $sformatf("L=256 wr k=%0d t=%0d", k, t));
          chk(int'(wa20[k]) == hist20[t-2][k], $sformatf("L=20 wr k=%0d t=%0d", k, t));
        end
      end
      hist20.push_back(e20);
      hist256.push_back(e256);
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    phase(1'b0);
    phase(1'b1);
    phase(1'b0);
    phase(1'b1);
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
