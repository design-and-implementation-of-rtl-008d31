// tb_nl_bool_fn: self-checking test of the nonlinear Boolean function.
//
// 1. Property check on output bit 5 of an 8-bit instance: its five inputs
//    (x3, x2, s6, s7, x7) are swept through all 32 values while every other
//    input bit is random; the 32-entry truth table must be balanced (weight
//    16) and its Walsh spectrum must give nonlinearity 2^4 - max|W|/2 = 12.
// 2. Random vectors on 8-bit and 128-bit instances against the defining
//    expression f[j] = x[j-2] ^ x[j-3]&s[j+1] ^ s[j+2]&x[N-1], where a
//    negative hash index stands for x[N-1] and LFSR indices wrap modulo N.
module tb_nl_bool_fn;
  int checks = 0, failures = 0;

  logic [7:0]   x8, s8, f8;
  logic [127:0] x128, s128, f128;
  nl_bool_fn #(.N(8)) dut8 (.x(x8), .s(s8), .f(f8));
  nl_bool_fn          dut128 (.x(x128), .s(s128), .f(f128));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [127:0] ref_f(input logic [127:0] x, input logic [127:0] s, input int n);
    logic [127:0] r;
    r = '0;
    for (int j = 0; j < n; j++) begin
      logic a, b;
      a = (j >= 2) ? x[j-2] : x[n-1];
      b = (j >= 3) ? x[j-3] : x[n-1];
      r[j] = a ^ (b & s[(j+1)%n]) ^ (s[(j+2)%n] & x[n-1]);
    end
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit tt [32];
    int weight, maxw;
    // truth table of f[5] over (x3,x2,x7,s6,s7)
    weight = 0;
    for (int v = 0; v < 32; v++) begin
      x8 = 8'($urandom); s8 = 8'($urandom);
      x8[3] = v[0]; x8[2] = v[1]; x8[7] = v[2]; s8[6] = v[3]; s8[7] = v[4];
      #1;
      tt[v] = f8[5];
      weight += int'(f8[5]);
    end
    check(weight == 16, $sformatf("f balanced, weight %0d", weight));
    maxw = 0;
    for (int a = 0; a < 32; a++) begin
      int w;
      w = 0;
      for (int v = 0; v < 32; v++)
        w += ((tt[v] ^ ($countones(a & v) % 2 == 1)) ? -1 : 1);
      if (w < 0) w = -w;
      if (w > maxw) maxw = w;
    end
    check(16 - maxw / 2 == 12, $sformatf("f nonlinearity %0d", 16 - maxw / 2));

    for (int i = 0; i < 200; i++) begin
      x8 = 8'($urandom); s8 = 8'($urandom);
      x128 = {$urandom, $urandom, $urandom, $urandom};
      s128 = {$urandom, $urandom, $urandom, $urandom};
      #1;
      check(f8 === ref_f({120'b0, x8}, {120'b0, s8}, 8)[7:0], "f (8) random");
      check(f128 === ref_f(x128, s128, 128), "f (128) random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
