// tb_lfsr_clk_ctrl: exhaustive test of the LFSR clock control for the
// default width (2 bits, value 0) and for a 3-bit instance matching value 5.
module tb_lfsr_clk_ctrl;
  int checks = 0, failures = 0;

  logic [1:0] h2;
  logic [2:0] h3;
  logic adv, st2, st3;
  lfsr_clk_ctrl dut2 (.hash_lo(h2), .advance(adv), .step(st2));
  lfsr_clk_ctrl #(.CTRL_BITS(3), .CTRL_VALUE(3'd5)) dut3 (.hash_lo(h3), .advance(adv), .step(st3));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2; a++)
      for (int v = 0; v < 8; v++) begin
        adv = a[0]; h2 = v[1:0]; h3 = v[2:0];
        #1;
        check(st2 == (a == 1 && v[1:0] == 0), $sformatf("2-bit a=%0d v=%0d", a, v));
        check(st3 == (a == 1 && v == 5),      $sformatf("3-bit a=%0d v=%0d", a, v));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
