// Tests the PE memory with random writes and reads against a model array:
// synchronous read (data one clock after the address), read of the word
// being written returns the old contents, writes only with we.
module tb_ldpc_ram;
  localparam int W = 9;
  localparam int DEPTH = 256;

  logic clk = 1'b0;
  logic we = 1'b0;
  logic [7:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] model [DEPTH];
  int checks = 0, failures = 0, n_collide = 0;

  ldpc_ram #(.W(W), .DEPTH(DEPTH)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);
  always #5 clk = ~clk;

  initial begin
    // Fill.
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = 8'(a); wdata = W'($urandom); model[a] = wdata;
    end
    for (int t = 0; t < 5000; t++) begin
      logic [W-1:0] expv;
      @(negedge clk);
      we    = 1'($urandom);
      waddr = 8'($urandom);
      wdata = W'($urandom);
      raddr = (t % 7 == 0) ? waddr : 8'($urandom);
      if (we && raddr == waddr) n_collide++;
      expv = model[raddr];
      if (we) model[waddr] = wdata;
      @(posedge clk);
      #1;
      checks++;
      if (rdata != expv) begin
        failures++;
        if (failures < 10) $display("FAIL: addr %0d got %h expected %h", raddr, rdata, expv);
      end
    end
    checks++;
    if (n_collide == 0) failures++;
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
