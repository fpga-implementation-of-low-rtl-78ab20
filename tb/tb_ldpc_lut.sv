// Tests the f(x) table: every input of a 9-bit and an 8-bit instance is
// compared with f computed here as 32*ln(coth(x/64)), rounded, saturated at
// 127 and zero from input 170 on.
module tb_ldpc_lut;
  import ldpc_ref_pkg::*;

  logic [8:0] x9;
  logic [7:0] x8;
  logic [6:0] y9, y8;
  int checks = 0, failures = 0;

  ldpc_lut #(.IN_W(9)) dut9 (.x(x9), .y(y9));
  ldpc_lut #(.IN_W(8)) dut8 (.x(x8), .y(y8));

  initial begin
    for (int i = 0; i < 512; i++) begin
      x9 = 9'(i);
      x8 = 8'(i);
      #1;
      checks++;
      if (int'(y9) != f_ref(i)) begin
        failures++;
        $display("FAIL: f(%0d) = %0d, expected %0d", i, y9, f_ref(i));
      end
      if (i < 256) begin
        checks++;
        if (int'(y8) != f_ref(i)) begin
          failures++;
          $display("FAIL: 8-bit f(%0d) = %0d, expected %0d", i, y8, f_ref(i));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
