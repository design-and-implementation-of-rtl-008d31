// tb_reseed_lfsr: self-checking test of the reseeding LFSR.
//
// Two instances: an 8-bit one with x^8+x^6+x^5+x^4+1 and the default 128-bit
// one. The reference is the linear recurrence of the output sequence,
// a[k+N] = XOR of a[k+j] over the taps j, from which the register contents
// after t steps are a[t+N-1:t]. Checks: reset value, load of key^iv, stepping,
// hold, load priority over step, all-zero seed substitution, and the full
// period 2^8-1 of the 8-bit register (no earlier repeat).
module tb_reseed_lfsr;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // ---------------- 8-bit instance ----------------
  logic rst_n, load8, step8;
  logic [7:0] key8, iv8, st8;
  reseed_lfsr #(.N(8), .POLY(8'b0111_0001)) dut8 (
    .clk, .rst_n, .load(load8), .key(key8), .iv(iv8), .step(step8), .state(st8));

  // ---------------- 128-bit instance (defaults) ----------------
  logic load128, step128;
  logic [127:0] key128, iv128, st128;
  reseed_lfsr dut128 (
    .clk, .rst_n, .load(load128), .key(key128), .iv(iv128), .step(step128), .state(st128));

  localparam int T8[4]   = '{0, 4, 5, 6};
  localparam int T128[4] = '{0, 99, 101, 126};

  bit seq8 [0:1023];
  bit seq128 [0:2047];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [7:0] ref8(input int t);
    logic [7:0] v;
    for (int i = 0; i < 8; i++) v[i] = seq8[t+i];
    return v;
  endfunction
  function automatic logic [127:0] ref128(input int t);
    logic [127:0] v;
    for (int i = 0; i < 128; i++) v[i] = seq128[t+i];
    return v;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] seed8;
    logic [127:0] seed128;
    int period;
    rst_n = 1'b0; load8 = 0; step8 = 0; load128 = 0; step128 = 0;
    key8 = 8'hA5; iv8 = 8'h3C; key128 = '0; iv128 = '0;
    #12;
    check(st8 == 8'h01 && st128 == 128'h1, "reset value");
    rst_n = 1'b1;
    @(negedge clk);

    // load 8-bit
    load8 = 1; step8 = 1;   // load has priority
    @(negedge clk);
    load8 = 0; step8 = 0;
    seed8 = 8'hA5 ^ 8'h3C;
    check(st8 == seed8, "load key^iv (8)");
    for (int i = 0; i < 8; i++) seq8[i] = seed8[i];
    for (int k = 0; k + 8 < 1024; k++) begin
      bit b;
      b = 0;
      foreach (T8[q]) b ^= seq8[k + T8[q]];
      seq8[k+8] = b;
    end
    // step with holds in between
    for (int t = 1; t <= 40; t++) begin
      step8 = 1;
      @(negedge clk);
      check(st8 === ref8(t), $sformatf("step %0d (8)", t));
      step8 = 0;
      if (t % 7 == 0) begin
        @(negedge clk); @(negedge clk);
        check(st8 === ref8(t), $sformatf("hold after step %0d (8)", t));
      end
    end
    // period: reload and count steps until the seed comes back
    load8 = 1; @(negedge clk); load8 = 0;
    period = 0;
    step8 = 1;
    do begin
      @(negedge clk);
      period++;
    end while (st8 != seed8 && period < 1000);
    step8 = 0;
    check(period == 255, $sformatf("period 255, got %0d", period));

    // zero seed
    key8 = 8'h5A; iv8 = 8'h5A;
    load8 = 1; @(negedge clk); load8 = 0;
    check(st8 == 8'h01, "zero seed replaced by 1");
    step8 = 1; @(negedge clk); step8 = 0;
    check(st8 == 8'h80, "step from 1: taps of x^0 feed the top");

    // 128-bit
    key128 = {$urandom, $urandom, $urandom, $urandom};
    iv128  = {$urandom, $urandom, $urandom, $urandom};
    seed128 = key128 ^ iv128;
    load128 = 1; @(negedge clk); load128 = 0;
    check(st128 == seed128, "load key^iv (128)");
    for (int i = 0; i < 128; i++) seq128[i] = seed128[i];
    for (int k = 0; k + 128 < 2048; k++) begin
      bit b;
      b = 0;
      foreach (T128[q]) b ^= seq128[k + T128[q]];
      seq128[k+128] = b;
    end
    step128 = 1;
    for (int t = 1; t <= 700; t++) begin
      @(negedge clk);
      check(st128 === ref128(t), $sformatf("step %0d (128)", t));
    end
    step128 = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
